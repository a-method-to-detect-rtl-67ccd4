// flit_fifo_tb: random pushes and pops against a queue model, checking the
// head word and the full/empty flags every cycle, and that a word pushed at
// one edge is at the head from the next cycle.
module flit_fifo_tb;
  localparam int W = 77, D = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [W-1:0] wdata = '0, head;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0;

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .rst_n(rst_n), .push_i(push), .wdata_i(wdata),
                                         .pop_i(pop), .head_o(head), .full_o(full), .empty_o(empty));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D) ||
          (q.size() > 0 && head !== q[0])) begin
        failures++;
        $display("FAIL cycle %0d size=%0d empty=%b full=%b", i, q.size(), empty, full);
      end
      if (full) n_full++;
      // Phases that fill and drain the buffer.
      push  = !full && ($urandom_range(99, 0) < ((i / 500) % 2 ? 30 : 80));
      pop   = !empty && ($urandom_range(99, 0) < ((i / 500) % 2 ? 80 : 30));
      wdata = {$urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    checks++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
