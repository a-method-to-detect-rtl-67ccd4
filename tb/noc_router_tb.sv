// noc_router_tb: two routers of the 6x6 mesh under random traffic on all
// five inputs with random downstream back-pressure: junction router 15 at
// (2,2) and plain router 9 at (2,1). A model keeps the words buffered per
// input; every word that leaves must be the head of an input whose
// reference route is that output.
//   Phase 1 (correction off): words leave unchanged.
//   Phase 2 (correction on): words entering the junction router carry up to
//   three corrupted wires and must leave as the clean JTEC word of the
//   original flit; the junction router's link alarms must be raised.
// It also checks that an uncontested flit leaves one cycle after it is
// written, and that back-pressure (a full buffer) occurs.
module noc_router_tb;
  import eccjr_pkg::*;
  import jtec_ref_pkg::*;
  import noc_ref_pkg::*;

  localparam int NP = 5;
  localparam int PX[2] = '{2, 2};
  localparam int PY[2] = '{2, 1};

  logic clk = 0, rst_n = 0, jtec_en = 0;
  logic       in_valid [2][NP];
  link_word_t in_word  [2][NP];
  logic       in_ready [2][NP];
  logic       out_valid[2][NP];
  link_word_t out_word [2][NP];
  logic       out_ready[2][NP];
  logic       alarm    [2][NP];

  // Model: per DUT, per input, queue of {original flit, word sent}.
  logic [31:0] qf[2][NP][$];
  int checks = 0, failures = 0, n_stall = 0, n_corrected = 0, n_out = 0;

  always #5 clk = ~clk;

  noc_router #(.X(2), .Y(2), .IS_JUNCTION(1'b1)) u_jr (
    .clk(clk), .rst_n(rst_n), .jtec_en_i(jtec_en),
    .in_valid_i(in_valid[0]), .in_word_i(in_word[0]), .in_ready_o(in_ready[0]),
    .out_valid_o(out_valid[0]), .out_word_o(out_word[0]), .out_ready_i(out_ready[0]),
    .link_alarm_o(alarm[0]));

  noc_router #(.X(2), .Y(1), .IS_JUNCTION(1'b0)) u_plain (
    .clk(clk), .rst_n(rst_n), .jtec_en_i(jtec_en),
    .in_valid_i(in_valid[1]), .in_word_i(in_word[1]), .in_ready_o(in_ready[1]),
    .out_valid_o(out_valid[1]), .out_word_o(out_word[1]), .out_ready_i(out_ready[1]),
    .link_alarm_o(alarm[1]));

  function automatic logic [31:0] rand_flit();
    logic [31:0] f;
    f = $urandom;
    f[18:16] = 3'($urandom_range(MX - 1, 0));
    f[21:19] = 3'($urandom_range(MY - 1, 0));
    return f;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] cur_f[2][NP];   // original flit of the word on offer
  bit          monitor_on = 0;
  bit          corrupting = 0;

  // At each edge: words leaving must be model heads routed to that output;
  // then words accepted at this edge join the model.
  always @(posedge clk) if (monitor_on) begin
    for (int d = 0; d < 2; d++) begin
      for (int o = 0; o < NP; o++) begin
        if (out_valid[d][o] && out_ready[d][o]) begin
          bit found;
          found = 1'b0;
          for (int i = 0; i < NP && !found; i++) begin
            if (qf[d][i].size() > 0 &&
                ref_route(PX[d], PY[d], int'(qf[d][i][0][18:16]), int'(qf[d][i][0][21:19])) == o &&
                out_word[d][o] === ref_jtec(qf[d][i][0])) begin
              found = 1'b1;
              void'(qf[d][i].pop_front());
            end
          end
          checks++;
          n_out++;
          if (!found) begin
            failures++;
            $display("FAIL dut %0d output %0d: unexpected word %h", d, o, out_word[d][o]);
          end else if (corrupting && d == 0) n_corrected++;
        end
      end
      for (int i = 0; i < NP; i++) begin
        if (in_valid[d][i] && in_ready[d][i]) qf[d][i].push_back(cur_f[d][i]);
        if (in_valid[d][i] && !in_ready[d][i]) n_stall++;
      end
    end
  end

  initial begin
    logic [31:0] f;
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < NP; i++) begin
        in_valid[d][i] = 0; in_word[d][i] = '0; out_ready[d][i] = 1; cur_f[d][i] = '0;
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);

    // Zero-load latency: written at one edge, offered on the output in the
    // following cycle.
    f = rand_flit();
    f[18:16] = 3'd4; f[21:19] = 3'd2;            // east of (2,2)
    in_valid[0][PORT_WEST] = 1; in_word[0][PORT_WEST] = ref_jtec(f);
    @(negedge clk);
    in_valid[0][PORT_WEST] = 0;
    checks++;
    if (!(out_valid[0][PORT_EAST] && out_word[0][PORT_EAST] === ref_jtec(f))) begin
      failures++;
      $display("FAIL zero-load hop latency");
    end
    @(negedge clk);
    monitor_on = 1;

    for (int phase = 1; phase <= 2; phase++) begin
      jtec_en    = (phase == 2);
      corrupting = (phase == 2);
      for (int cyc = 0; cyc < 3000; cyc++) begin
        for (int d = 0; d < 2; d++)
          for (int i = 0; i < NP; i++) begin
            out_ready[d][i] = ($urandom_range(99, 0) < ((cyc / 500) % 2 ? 90 : 40));
            if (!in_valid[d][i] || in_ready[d][i]) begin
              in_valid[d][i] = ($urandom_range(99, 0) < 35);
              f = rand_flit();
              cur_f[d][i] = f;
              in_word[d][i] = (phase == 2 && d == 0) ? ref_flip(ref_jtec(f), $urandom_range(3, 0))
                                                     : ref_jtec(f);
            end
          end
        @(negedge clk);
      end
      // Drain.
      for (int d = 0; d < 2; d++)
        for (int i = 0; i < NP; i++) begin
          in_valid[d][i] = 0; out_ready[d][i] = 1;
        end
      repeat (60) @(negedge clk);
      for (int d = 0; d < 2; d++)
        for (int i = 0; i < NP; i++) begin
          checks++;
          if (qf[d][i].size() != 0) begin
            failures++;
            $display("FAIL dut %0d input %0d: %0d words never left", d, i, qf[d][i].size());
          end
        end
      if (phase == 1) begin
        checks++;
        if (alarm[0][0] || alarm[0][1] || alarm[0][2] || alarm[0][3] || alarm[0][4]) begin
          failures++;
          $display("FAIL alarm raised without corruption");
        end
      end
    end
    for (int i = 0; i < NP; i++) begin
      checks++;
      if (!alarm[0][i]) begin failures++; $display("FAIL no alarm on input %0d", i); end
    end
    checks += 2;
    if (n_stall == 0) begin failures++; $display("FAIL back-pressure never happened"); end
    if (n_corrected == 0) begin failures++; $display("FAIL no corrected word"); end
    $display("words out %0d, corrected-mode words %0d, stalled offers %0d", n_out, n_corrected, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
