// flit_fifo: router input buffer, a synchronous first-in first-out queue of
// DEPTH words. The depth of 8 follows the buffer size of the evaluated
// network; the circular-buffer construction is this design's.
//
// Interface: push_i writes wdata_i when not full; pop_i removes the head
// when not empty. head_o shows the oldest word combinationally (a word
// pushed at a clock edge is visible from the next cycle). full_o/empty_o
// are registered-state flags. Synchronous active-low reset empties it.
module flit_fifo #(
  parameter int unsigned WIDTH = 77,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic             pop_i,
  output logic [WIDTH-1:0] head_o,
  output logic             full_o,
  output logic             empty_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [AW:0]      count;
  logic             do_push, do_pop;

  always_comb begin
    full_o  = (count == (AW+1)'(DEPTH));
    empty_o = (count == '0);
    do_push = push_i && !full_o;
    do_pop  = pop_i && !empty_o;
    head_o  = mem[rd_ptr];
  end

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata_i;
  end

  // The user must respect the flags: no push when full, no pop when empty.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push_i |-> !full_o);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> !empty_o);

endmodule
