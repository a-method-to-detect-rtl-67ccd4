// eccjr_noc_tb: end-to-end test of the full 6x6 ECCJR network at its
// default parameters.
//
// Trojans are inserted on sixteen links that lead into junction routers; a
// Trojan fires on packets whose payload bits 3, 7, 11 and 15 are all 1.
//   1. Zero-load latency: single packets (among them router 7 -> router 29)
//      must arrive intact after hops + 1 cycles.
//   2. Attack, correction off: uniform random traffic, half of it
//      triggering. Corrupted packets are delivered faulty or to the wrong
//      node, until 20 % of the delivered packets are faulty and the
//      threshold monitor turns correction on.
//   3. Correction on: the same traffic. Every packet must reach its own
//      destination with its exact contents, also those a Trojan corrupted
//      (every Trojan firing in this phase is a corrected packet).
//   4. Hot spot: every node sends to node 14 at once, so buffers fill and
//      the processing elements see back-pressure; all must arrive intact.
// The link alarms must name only links that carry a Trojan, and at least
// one. Each mechanism (Trojan firing, faulty delivery, misdelivery,
// threshold crossing, correction, link alarm, back-pressure) is counted and
// must have happened.
module eccjr_noc_tb;
  import eccjr_pkg::*;
  import noc_ref_pkg::*;

  localparam int NN = 36;

  logic clk = 0, rst_n = 0;
  logic [NN-1:0]   tx_valid = '0, tx_ready, rx_valid, rx_faulty, rx_mis;
  flit_t           tx_flit [NN];
  flit_t           rx_flit [NN];
  logic [4*NN-1:0] ht_insert = '0, ht_fired;
  logic [5*NN-1:0] alarm, alarm_before;
  logic            jtec_en;
  logic [23:0]     pkt_total, pkt_faulty;

  eccjr_noc dut (
    .clk(clk), .rst_n(rst_n),
    .tx_valid_i(tx_valid), .tx_flit_i(tx_flit), .tx_ready_o(tx_ready),
    .rx_valid_o(rx_valid), .rx_flit_o(rx_flit), .rx_faulty_o(rx_faulty), .rx_misrouted_o(rx_mis),
    .ht_insert_i(ht_insert), .ht_fired_o(ht_fired), .link_alarm_o(alarm),
    .jtec_en_o(jtec_en), .pkt_total_o(pkt_total), .pkt_faulty_o(pkt_faulty));

  always #5 clk = ~clk;

  // Infected links: {source node, direction}; all end in a junction router.
  localparam int HT_SRC[16] = '{1, 6, 4, 11, 6, 9, 8, 13, 16, 19, 22, 27, 25, 28, 30, 33};
  localparam int HT_DIR[16] = '{4, 3, 2, 3,  2, 2, 1, 2,  4,  2,  4,  3,  4,  2,  2,  2};

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_fired = 0, n_faulty = 0, n_mis = 0, n_misdel = 0, n_corrected = 0, n_stall = 0, n_rx = 0;
  int n_inj = 0, enable_cycle = -1;
  bit checking = 0;      // phase 3/4: every delivery must be exact
  int seq [NN];
  bit offer_trig [NN];

  // Expected packets: key = flit as sent (with source fields).
  int     exp_dst [logic [31:0]];
  longint exp_t0  [logic [31:0]];
  longint lat_sum = 0;
  int     lat_n = 0;

  function automatic flit_t make_flit(input int src, input int dst, input int s, input bit trig);
    flit_t f;
    logic [14:0] q;
    q = 15'(s);
    f.app_id  = q[14:11];
    f.src_x   = 3'(src % MX);
    f.src_y   = 3'(src / MX);
    f.dst_x   = 3'(dst % MX);
    f.dst_y   = 3'(dst / MX);
    f.payload = {trig, q[10:8], trig, q[7:5], trig, q[4:2], trig, q[1:0], 1'b0};
    return f;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      n_fired += $countones(ht_fired);
      for (int n = 0; n < NN; n++) begin
        if (tx_valid[n] && !tx_ready[n]) n_stall++;
        if (tx_valid[n] && tx_ready[n]) begin
          exp_dst[tx_flit[n]] = int'(tx_flit[n].dst_y) * MX + int'(tx_flit[n].dst_x);
          exp_t0[tx_flit[n]]  = cycle;
          n_inj++;
        end
        if (rx_valid[n]) begin
          n_rx++;
          if (rx_faulty[n]) n_faulty++;
          if (rx_mis[n]) n_mis++;
          if (checking) begin
            checks++;
            if (!exp_dst.exists(rx_flit[n]) || exp_dst[rx_flit[n]] != n || rx_mis[n]) begin
              failures++;
              $display("FAIL node %0d received %h (faulty=%b mis=%b)", n, rx_flit[n], rx_faulty[n], rx_mis[n]);
            end else begin
              lat_sum += cycle - exp_t0[rx_flit[n]];
              lat_n++;
            end
          end
          // A packet corrupted by a Trojan (flit bits 16 and 0 inverted) that
          // ended at another node than the one it was sent to.
          if (!checking && rx_faulty[n] && exp_dst.exists(rx_flit[n] ^ 32'h0001_0001) &&
              exp_dst[rx_flit[n] ^ 32'h0001_0001] != n) begin
            n_misdel++;
            exp_dst.delete(rx_flit[n] ^ 32'h0001_0001);
            exp_t0.delete(rx_flit[n] ^ 32'h0001_0001);
          end
          if (exp_dst.exists(rx_flit[n])) begin
            exp_dst.delete(rx_flit[n]);
            exp_t0.delete(rx_flit[n]);
          end
        end
      end
    end
  end

  // Offer traffic from every node for `cycles` cycles.
  task automatic traffic(input int cycles, input int rate_pct, input int trig_pct, input int hotspot);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int n = 0; n < NN; n++) begin
        if (tx_valid[n] && !tx_ready[n]) continue;
        tx_valid[n] = 1'b0;
        if ($urandom_range(99, 0) < rate_pct) begin
          int d;
          d = (hotspot >= 0) ? hotspot : $urandom_range(NN - 1, 0);
          if (d == n) continue;
          tx_flit[n]  = make_flit(n, d, seq[n], $urandom_range(99, 0) < trig_pct);
          seq[n]++;
          tx_valid[n] = 1'b1;
        end
      end
    end
    @(negedge clk);
    // Let offers still waiting be taken.
    while (tx_valid != '0) begin
      for (int n = 0; n < NN; n++) if (tx_valid[n] && tx_ready[n]) tx_valid[n] = 1'b0;
      @(negedge clk);
    end
  endtask

  task automatic drain(input int cycles);
    tx_valid = '0;
    repeat (cycles) @(negedge clk);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pairs_s[4] = '{6, 0, 35, 14};
    int pairs_t[4] = '{28, 35, 0, 20};
    for (int n = 0; n < NN; n++) begin
      tx_flit[n] = '0;
      seq[n] = 0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. Zero-load latency, Trojans not yet inserted.
    foreach (pairs_s[k]) begin
      flit_t f;
      longint t0;
      int s, t;
      s = pairs_s[k]; t = pairs_t[k];
      f = make_flit(s, t, seq[s], 1'b0);
      seq[s]++;
      tx_flit[s] = f; tx_valid[s] = 1'b1;
      @(negedge clk);
      t0 = cycle;
      tx_valid[s] = 1'b0;
      while (!rx_valid[t]) @(negedge clk);
      checks++;
      if (cycle - t0 != longint'(ref_hops(s, t) + 1) || rx_flit[t] !== f) begin
        failures++;
        $display("FAIL zero-load %0d -> %0d: latency %0d, expected %0d", s + 1, t + 1, cycle - t0,
                 ref_hops(s, t) + 1);
      end
      @(negedge clk);
    end

    // 2. Attack with correction off.
    foreach (HT_SRC[k]) ht_insert[4 * HT_SRC[k] + HT_DIR[k] - 1] = 1'b1;
    for (int blk = 0; blk < 40 && !jtec_en; blk++) traffic(50, 5, 80, -1);
    enable_cycle = int'(cycle);
    checks++;
    if (!jtec_en) begin failures++; $display("FAIL threshold never reached"); end
    $display("correction enabled at cycle %0d: %0d of %0d delivered packets faulty, %0d misdelivered",
             enable_cycle, pkt_faulty, pkt_total, n_misdel);
    drain(200);
    exp_dst.delete();
    exp_t0.delete();

    // 3. Correction on. Alarms raised so far may stem from words corrupted
    // before the switch that were still buffered; only later ones count.
    alarm_before = alarm;
    checking = 1;
    begin
      int fired_before;
      fired_before = n_fired;
      traffic(2000, 5, 80, -1);
      drain(200);
      n_corrected = n_fired - fired_before;
    end
    // 4. Hot spot.
    traffic(60, 100, 50, 14);
    drain(2000);

    checks++;
    if (exp_dst.size() != 0) begin
      failures++;
      $display("FAIL %0d packets never delivered", exp_dst.size());
    end

    // Link alarms: only on junction inputs fed by an infected link.
    begin
      int n_alarm;
      n_alarm = 0;
      for (int n = 0; n < NN; n++)
        for (int p = 1; p < 5; p++)
          if (alarm[5 * n + p] && !alarm_before[5 * n + p]) begin
            int src, dir;
            bit ok;
            n_alarm++;
            src = (p == 1) ? n + MX : (p == 2) ? n + 1 : (p == 3) ? n - MX : n - 1;
            dir = (p == 1) ? 3 : (p == 2) ? 4 : (p == 3) ? 1 : 2;
            ok = 1'b0;
            foreach (HT_SRC[k]) if (HT_SRC[k] == src && HT_DIR[k] == dir) ok = 1'b1;
            checks++;
            if (!ok) begin failures++; $display("FAIL false alarm node %0d port %0d", n + 1, p); end
          end
      checks++;
      if (n_alarm == 0) begin failures++; $display("FAIL no link alarm"); end
      $display("link alarms raised with correction on: %0d", n_alarm);
    end

    // Every mechanism must have happened.
    checks += 6;
    if (n_fired == 0)     begin failures++; $display("FAIL no Trojan fired"); end
    if (n_faulty == 0)    begin failures++; $display("FAIL no faulty delivery"); end
    if (n_misdel == 0)    begin failures++; $display("FAIL no misdelivery"); end
    if (n_corrected == 0) begin failures++; $display("FAIL no Trojan fired with correction on"); end
    if (n_stall == 0)     begin failures++; $display("FAIL no back-pressure"); end
    if (lat_n == 0)       begin failures++; $display("FAIL nothing delivered while checking"); end
    $display("injected %0d delivered %0d; Trojan firings %0d; faulty %0d; misdelivered %0d; corrected %0d; stalls %0d",
             n_inj, n_rx, n_fired, n_faulty, n_misdel, n_corrected, n_stall);
    if (lat_n > 0) $display("average latency with correction on: %.2f cycles", real'(lat_sum) / lat_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
