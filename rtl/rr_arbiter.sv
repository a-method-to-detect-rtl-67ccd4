// rr_arbiter: round-robin arbiter for one router output port.
//
// grant_o is one-hot among the set req_i bits, starting the search at the
// requester after the one that last won. The priority pointer moves only
// when advance_i says the granted request was actually served, so a grant
// that waits on a busy downstream buffer keeps its priority. A round-robin
// switch allocator is this design's simple stand-in for the allocators of
// the evaluated router.
//
// Interface: req_i (N bits) -> grant_o (one-hot or zero), combinational;
// the pointer updates at the clock edge. Synchronous active-low reset.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_i,
  input  logic         advance_i,
  output logic [N-1:0] grant_o
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;

  always_comb begin
    logic [IW-1:0] idx;
    grant_o = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = IW'((int'(last) + k) % N);
      if (req_i[idx] && grant_o == '0) grant_o[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last <= IW'(N - 1);
    end else if (advance_i && grant_o != '0) begin
      for (int unsigned k = 0; k < N; k++)
        if (grant_o[k]) last <= IW'(k);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant_o));
  a_granted_requests: assert property (@(posedge clk) disable iff (!rst_n) (grant_o & ~req_i) == '0);

endmodule
