// jtec_decoder_tb: encodes random flits with the reference code, flips 0,
// 1, 2 or 3 random wires of the 77-bit word and checks that the decoder
// returns the original flit and raises error_o exactly when a wire was
// flipped. Also exercises every single-wire error position exhaustively.
module jtec_decoder_tb;
  import jtec_ref_pkg::*;

  logic [76:0] code;
  logic [31:0] data;
  logic        err, chose_b, uncorr;
  int checks = 0, failures = 0;
  int n_chose_b = 0;

  jtec_decoder dut (.code_i(code), .data_o(data), .error_o(err),
                    .chose_b_o(chose_b), .uncorrectable_o(uncorr));

  task automatic check_one(input logic [31:0] d, input logic [76:0] w, input int nerr);
    code = w;
    #1;
    checks++;
    if (data !== d || err !== (nerr != 0) || uncorr) begin
      failures++;
      $display("FAIL d=%h nerr=%0d got=%h err=%b uncorr=%b", d, nerr, data, err, uncorr);
    end
    if (chose_b) n_chose_b++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int k = 0; k < 77; k++) begin
      d = $urandom;
      check_one(d, ref_jtec(d) ^ (77'b1 << k), 1);
    end
    for (int i = 0; i < 20000; i++) begin
      int n;
      d = $urandom;
      n = i % 4;
      check_one(d, ref_flip(ref_jtec(d), n), n);
    end
    // Both copies must have been used.
    checks++;
    if (n_chose_b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
