// rr_arbiter_tb: random requests and advance strobes; the grant is compared
// with a round-robin reference (first requester after the last served one).
module rr_arbiter_tb;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, adv = 0;
  logic [N-1:0] req = '0, gnt;
  int last = N - 1;
  int checks = 0, failures = 0;

  rr_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req_i(req), .advance_i(adv), .grant_o(gnt));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] expect_grant(input logic [N-1:0] r, input int l);
    for (int k = 1; k <= N; k++)
      if (r[(l + k) % N]) return N'(1) << ((l + k) % N);
    return '0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      req = N'($urandom);
      adv = ($urandom_range(3, 0) != 0);
      #1;
      checks++;
      if (gnt !== expect_grant(req, last)) begin
        failures++;
        $display("FAIL req=%b last=%0d gnt=%b", req, last, gnt);
      end
      if (adv && gnt != 0)
        for (int k = 0; k < N; k++) if (gnt[k]) last = k;
    end
    // Fairness: all requesting continuously, each served once per N grants.
    @(negedge clk);
    req = '1; adv = 1;
    for (int i = 0; i < 3 * N; i++) begin
      #1;
      checks++;
      if (gnt !== (N'(1) << ((last + 1) % N))) failures++;
      last = (last + 1) % N;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
