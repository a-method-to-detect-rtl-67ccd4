// threshold_monitor_tb: 36 delivery inputs. First a long clean stretch with
// a few faulty packets (well under 20 %), then an attack with many faulty
// packets. A reference counts delivered and faulty packets and predicts the
// first cycle in which faulty * 100 >= 20 * delivered (with at least
// MIN_PACKETS delivered); jtec_en must rise exactly one edge later, stay
// up, and the counters must match the reference throughout.
module threshold_monitor_tb;
  localparam int N = 36;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] v = '0, fl = '0;
  logic en;
  logic [23:0] total, faulty;
  longint rt = 0, rf = 0;
  bit ref_en = 0;
  int checks = 0, failures = 0, rise_cycle = -1;

  always #5 clk = ~clk;

  threshold_monitor dut (.clk(clk), .rst_n(rst_n), .rx_valid_i(v), .rx_faulty_i(fl),
                         .jtec_en_o(en), .total_o(total), .faulty_o(faulty));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Early faulty packets alone must not trigger (below MIN_PACKETS).
    @(negedge clk);
    v = 36'hFF; fl = 36'hFF;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      rt += $countones(v);
      rf += $countones(v & fl);
      if (!ref_en && rt >= 64 && rf * 100 >= 20 * rt) begin
        ref_en = 1;
        rise_cycle = i;
      end
      @(negedge clk);
      checks++;
      if (en !== ref_en || total !== 24'(rt) || faulty !== 24'(rf)) begin
        failures++;
        $display("FAIL cycle %0d en=%b ref=%b total=%0d/%0d faulty=%0d/%0d", i, en, ref_en, total, rt, faulty, rf);
      end
      for (int k = 0; k < N; k++) begin
        v[k]  = ($urandom_range(99, 0) < 10);
        fl[k] = ($urandom_range(99, 0) < ((i < 2000) ? 5 : 60));
      end
    end
    checks++;
    if (rise_cycle < 2000) begin
      failures++;
      $display("FAIL enable rose at %0d, expected during the attack", rise_cycle);
    end
    $display("enable rose at cycle %0d", rise_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
