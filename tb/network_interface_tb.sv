// network_interface_tb: NI of node (3,4).
//   TX: random flits must appear on the network side as the JTEC word of
//   the flit with the source fields replaced by (3,4); ready passes back.
//   RX: JTEC words with 0..3 corrupted wires are delivered; one cycle later
//   rx_flit must be the corrected flit (correction on) or the raw copy A
//   (correction off); rx_faulty must flag every corrupted word and
//   rx_misrouted every flit whose destination is not (3,4).
module network_interface_tb;
  import eccjr_pkg::*;
  import jtec_ref_pkg::*;

  logic clk = 0, rst_n = 0, jtec_en = 0;
  logic tx_valid = 0, tx_ready, net_valid_o, net_ready_i = 1;
  flit_t tx_flit = '0;
  link_word_t net_word_o;
  logic net_valid_i = 0, net_ready_o;
  link_word_t net_word_i = '0;
  logic rx_valid, rx_faulty, rx_mis;
  flit_t rx_flit;
  int checks = 0, failures = 0, n_faulty = 0, n_mis = 0;

  always #5 clk = ~clk;

  network_interface #(.X(3), .Y(4)) dut (
    .clk(clk), .rst_n(rst_n), .jtec_en_i(jtec_en),
    .tx_valid_i(tx_valid), .tx_flit_i(tx_flit), .tx_ready_o(tx_ready),
    .net_valid_o(net_valid_o), .net_word_o(net_word_o), .net_ready_i(net_ready_i),
    .net_valid_i(net_valid_i), .net_word_i(net_word_i), .net_ready_o(net_ready_o),
    .rx_valid_o(rx_valid), .rx_flit_o(rx_flit), .rx_faulty_o(rx_faulty), .rx_misrouted_o(rx_mis));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] f, fs, exp_flit;
    logic [76:0] w;
    int nerr;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      jtec_en = (i >= 1500);
      // TX side, combinational.
      f = $urandom;
      tx_flit = flit_t'(f);
      tx_valid = $urandom_range(1, 0);
      net_ready_i = $urandom_range(1, 0);
      fs = f;
      fs[24:22] = 3'd3;
      fs[27:25] = 3'd4;
      // RX side.
      f = $urandom;
      if (i % 2 == 0) begin f[18:16] = 3'd3; f[21:19] = 3'd4; end
      nerr = $urandom_range(3, 0);
      if (i % 5 == 0) nerr = 0;
      w = ref_flip(ref_jtec(f), nerr);
      net_valid_i = ($urandom_range(3, 0) != 0);
      net_word_i = w;
      #1;
      checks++;
      if (net_word_o !== ref_jtec(fs) || net_valid_o !== tx_valid || tx_ready !== net_ready_i ||
          net_ready_o !== 1'b1) begin
        failures++;
        $display("FAIL tx %0d", i);
      end
      @(negedge clk);
      exp_flit = jtec_en ? f : ref_raw(w);
      checks++;
      if (rx_valid !== net_valid_i) begin failures++; $display("FAIL rx_valid %0d", i); end
      if (net_valid_i) begin
        checks++;
        if (rx_flit !== flit_t'(exp_flit) || rx_faulty !== (nerr != 0) ||
            rx_mis !== (exp_flit[18:16] != 3'd3 || exp_flit[21:19] != 3'd4)) begin
          failures++;
          $display("FAIL rx %0d en=%b nerr=%0d flit=%h exp=%h faulty=%b mis=%b", i, jtec_en, nerr,
                   rx_flit, exp_flit, rx_faulty, rx_mis);
        end
        if (rx_faulty) n_faulty++;
        if (rx_mis) n_mis++;
      end
    end
    checks++;
    if (n_faulty == 0 || n_mis == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
