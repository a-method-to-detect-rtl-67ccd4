// ht_link_trojan_tb: sends valid JTEC words through a Trojan site, with and
// without the Trojan inserted and with trigger bits (flit bits 3, 7, 11, 15)
// set or not. Expected: the word is untouched unless inserted and all four
// trigger bits are 1; then exactly the wires of flit bit 16 (copies A and
// B) and flit bit 0 (copy A) are inverted and fired_o is raised.
module ht_link_trojan_tb;
  import jtec_ref_pkg::*;

  logic        ins, vld, fired;
  logic [76:0] win, wout;
  int checks = 0, failures = 0, n_fired = 0;

  ht_link_trojan dut (.inserted_i(ins), .valid_i(vld), .word_i(win), .word_o(wout), .fired_o(fired));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [76:0] mask, exp;
    logic        trig;
    mask = '0;
    mask[2*(ref_data_pos(16)-1)]     = 1'b1;
    mask[2*(ref_data_pos(16)-1) + 1] = 1'b1;
    mask[2*(ref_data_pos(0)-1)]      = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      d = $urandom;
      if (i % 3 == 0) d |= 32'h8888;
      ins = ($urandom_range(3, 0) != 0);
      vld = $urandom_range(1, 0);
      win = ref_jtec(d);
      #1;
      trig = d[3] & d[7] & d[11] & d[15];
      exp  = (ins && trig) ? (win ^ mask) : win;
      checks++;
      if (wout !== exp || fired !== (ins && trig && vld)) begin
        failures++;
        $display("FAIL d=%h ins=%b vld=%b fired=%b", d, ins, vld, fired);
      end
      if (fired) n_fired++;
    end
    checks++;
    if (n_fired == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
