// jtec_encoder_tb: checks the JTEC encoder against the reference code on
// corner values and random flits; also checks that both copies are
// identical and that the Hamming copy has zero weight on the syndrome.
module jtec_encoder_tb;
  import jtec_ref_pkg::*;

  logic [31:0] data;
  logic [76:0] code;
  int checks = 0, failures = 0;

  jtec_encoder dut (.data_i(data), .code_o(code));

  task automatic check_one(input logic [31:0] d);
    logic [76:0] exp;
    data = d;
    #1;
    exp = ref_jtec(d);
    checks++;
    if (code !== exp) begin
      failures++;
      $display("FAIL data=%h code=%h exp=%h", d, code, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h0000_0000);
    check_one(32'hFFFF_FFFF);
    for (int i = 0; i < 32; i++) check_one(32'h1 << i);
    for (int i = 0; i < 2000; i++) check_one($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
