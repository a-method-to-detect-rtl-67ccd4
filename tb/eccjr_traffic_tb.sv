// eccjr_traffic_tb: the evaluated traffic patterns on the full 6x6 network
// with Trojans active and correction enabled.
//
// Patterns (k = 6 routers per dimension, applied to x and to y):
//   uniform  - every destination equally likely;
//   tornado  - d = (s + ceil(k/2) - 1) mod k;
//   neighbor - d = (s + 1) mod k.
// Injection rates 0.01, 0.05 and 0.10 packets per node per cycle. Before each
// run the network is reset, sixteen links into junction routers get a
// Trojan, and triggering traffic is sent until the monitor switches
// correction on. Then 2000 cycles of the pattern are offered (half of the
// packets trigger the Trojans). Every packet must arrive at its own
// destination with its exact contents; the average latency (injection
// accepted to delivery, in cycles) and the Trojan firings are printed.
// The same runs are then repeated on a second network whose threshold is out
// of reach (Trojans active, no correction): all packets must still arrive
// somewhere, Trojan-hit ones corrupted, and the share delivered intact
// (reliability) is printed.
module eccjr_traffic_tb;
  import eccjr_pkg::*;
  import noc_ref_pkg::*;

  localparam int NN = 36;
  localparam int HT_SRC[16] = '{1, 6, 4, 11, 6, 9, 8, 13, 16, 19, 22, 27, 25, 28, 30, 33};
  localparam int HT_DIR[16] = '{4, 3, 2, 3,  2, 2, 1, 2,  4,  2,  4,  3,  4,  2,  2,  2};
  localparam int RATES[3]   = '{1, 5, 10};   // percent

  logic clk = 0, rst_n = 0;
  logic [NN-1:0]   tx_valid = '0, tx_ready, rx_valid, rx_faulty, rx_mis;
  flit_t           tx_flit [NN];
  flit_t           rx_flit [NN];
  logic [4*NN-1:0] ht_insert = '0, ht_fired;
  logic [5*NN-1:0] alarm;
  logic            jtec_en;
  logic [23:0]     pkt_total, pkt_faulty;

  // Two networks: [0] as built (correction switches on at 20 %), [1] with
  // the threshold out of reach, i.e. Trojans active and no correction. Only
  // the one selected by `mode` gets traffic.
  bit              mode = 0;
  logic [NN-1:0]   tx_valid_n [2], tx_ready_n [2], rx_valid_n [2], rx_faulty_n [2], rx_mis_n [2];
  flit_t           rx_flit_n  [2][NN];
  logic [4*NN-1:0] ht_fired_n [2];
  logic [5*NN-1:0] alarm_n    [2];
  logic            jtec_en_n  [2];
  logic [23:0]     pkt_total_n [2], pkt_faulty_n [2];

  eccjr_noc dut (
    .clk(clk), .rst_n(rst_n),
    .tx_valid_i(tx_valid_n[0]), .tx_flit_i(tx_flit), .tx_ready_o(tx_ready_n[0]),
    .rx_valid_o(rx_valid_n[0]), .rx_flit_o(rx_flit_n[0]), .rx_faulty_o(rx_faulty_n[0]),
    .rx_misrouted_o(rx_mis_n[0]), .ht_insert_i(ht_insert), .ht_fired_o(ht_fired_n[0]),
    .link_alarm_o(alarm_n[0]), .jtec_en_o(jtec_en_n[0]), .pkt_total_o(pkt_total_n[0]),
    .pkt_faulty_o(pkt_faulty_n[0]));

  eccjr_noc #(.THRESHOLD_PCT(101)) dut_unprotected (
    .clk(clk), .rst_n(rst_n),
    .tx_valid_i(tx_valid_n[1]), .tx_flit_i(tx_flit), .tx_ready_o(tx_ready_n[1]),
    .rx_valid_o(rx_valid_n[1]), .rx_flit_o(rx_flit_n[1]), .rx_faulty_o(rx_faulty_n[1]),
    .rx_misrouted_o(rx_mis_n[1]), .ht_insert_i(ht_insert), .ht_fired_o(ht_fired_n[1]),
    .link_alarm_o(alarm_n[1]), .jtec_en_o(jtec_en_n[1]), .pkt_total_o(pkt_total_n[1]),
    .pkt_faulty_o(pkt_faulty_n[1]));

  always_comb begin
    tx_valid_n[0] = mode ? '0 : tx_valid;
    tx_valid_n[1] = mode ? tx_valid : '0;
    tx_ready   = tx_ready_n[mode];
    rx_valid   = rx_valid_n[mode];
    rx_faulty  = rx_faulty_n[mode];
    rx_mis     = rx_mis_n[mode];
    rx_flit    = rx_flit_n[mode];
    ht_fired   = ht_fired_n[mode];
    alarm      = alarm_n[mode];
    jtec_en    = jtec_en_n[mode];
    pkt_total  = pkt_total_n[mode];
    pkt_faulty = pkt_faulty_n[mode];
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  bit checking = 0;
  int seq [NN];
  int n_fired = 0, n_del = 0, n_bad = 0, n_wrong_node = 0;
  int     exp_dst [logic [31:0]];
  longint exp_t0  [logic [31:0]];
  longint lat_sum = 0, hop_sum = 0;

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

  function automatic int pattern_dst(input int pat, input int s);
    int x, y;
    x = s % MX; y = s / MX;
    case (pat)
      0: return $urandom_range(NN - 1, 0);
      1: return ((y + (MY + 1) / 2 - 1) % MY) * MX + (x + (MX + 1) / 2 - 1) % MX;
      default: return ((y + 1) % MY) * MX + (x + 1) % MX;
    endcase
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && checking) begin
      n_fired += $countones(ht_fired);
      for (int n = 0; n < NN; n++) begin
        if (tx_valid[n] && tx_ready[n]) begin
          exp_dst[tx_flit[n]] = int'(tx_flit[n].dst_y) * MX + int'(tx_flit[n].dst_x);
          exp_t0[tx_flit[n]]  = cycle;
        end
        if (rx_valid[n] && mode) begin
          // Unprotected network: count what arrives intact, corrupted and
          // at the wrong node (a Trojan-hit flit has bits 16 and 0 inverted).
          if (exp_dst.exists(rx_flit[n]) && exp_dst[rx_flit[n]] == n) begin
            lat_sum += cycle - exp_t0[rx_flit[n]];
            hop_sum += ref_hops(int'(rx_flit[n].src_y) * MX + int'(rx_flit[n].src_x), n);
            n_del++;
            exp_dst.delete(rx_flit[n]);
            exp_t0.delete(rx_flit[n]);
          end else if (exp_dst.exists(rx_flit[n] ^ 32'h0001_0001)) begin
            n_bad++;
            if (exp_dst[rx_flit[n] ^ 32'h0001_0001] != n) n_wrong_node++;
            exp_dst.delete(rx_flit[n] ^ 32'h0001_0001);
            exp_t0.delete(rx_flit[n] ^ 32'h0001_0001);
          end
        end else if (rx_valid[n]) begin
          checks++;
          if (!exp_dst.exists(rx_flit[n]) || exp_dst[rx_flit[n]] != n) begin
            failures++;
            $display("FAIL node %0d received %h", n, rx_flit[n]);
          end else begin
            lat_sum += cycle - exp_t0[rx_flit[n]];
            hop_sum += ref_hops(int'(rx_flit[n].src_y) * MX + int'(rx_flit[n].src_x), n);
            n_del++;
            exp_dst.delete(rx_flit[n]);
            exp_t0.delete(rx_flit[n]);
          end
        end
      end
    end
  end

  // pat < 0: uniform triggering traffic used to reach the threshold.
  task automatic traffic(input int cycles, input int rate_pct, input int pat);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int n = 0; n < NN; n++) begin
        if (tx_valid[n] && !tx_ready[n]) continue;
        tx_valid[n] = 1'b0;
        if ($urandom_range(999, 0) < rate_pct * 10) begin
          int d;
          d = pattern_dst((pat < 0) ? 0 : pat, n);
          if (d == n) continue;
          tx_flit[n]  = make_flit(n, d, seq[n], (pat < 0) || ($urandom_range(1, 0) == 1));
          seq[n]++;
          tx_valid[n] = 1'b1;
        end
      end
    end
    @(negedge clk);
    while (tx_valid != '0) begin
      for (int n = 0; n < NN; n++) if (tx_valid[n] && tx_ready[n]) tx_valid[n] = 1'b0;
      @(negedge clk);
    end
  endtask

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names[3] = '{"uniform", "tornado", "neighbor"};
    for (int n = 0; n < NN; n++) begin tx_flit[n] = '0; seq[n] = 0; end
    for (int md = 0; md < 2; md++) begin
      mode = md[0];
      $display("%s", md ? "Trojans active, correction never enabled:" : "Trojans active, correction enabled:");
      for (int pat = 0; pat < 3; pat++) begin
        foreach (RATES[r]) begin
          rst_n = 0;
          tx_valid = '0;
          ht_insert = '0;
          repeat (4) @(negedge clk);
          rst_n = 1;
          foreach (HT_SRC[k]) ht_insert[4 * HT_SRC[k] + HT_DIR[k] - 1] = 1'b1;
          if (!mode) begin
            for (int blk = 0; blk < 40 && !jtec_en; blk++) traffic(50, 5, -1);
            checks++;
            if (!jtec_en) begin failures++; $display("FAIL threshold not reached"); end
          end
          tx_valid = '0;
          repeat (300) @(negedge clk);
          exp_dst.delete(); exp_t0.delete();
          lat_sum = 0; hop_sum = 0; n_del = 0; n_fired = 0; n_bad = 0; n_wrong_node = 0;
          checking = 1;
          traffic(2000, RATES[r], pat);
          repeat (500) @(negedge clk);
          checking = 0;
          checks += 2;
          if (exp_dst.size() != 0) begin
            failures++;
            $display("FAIL %s rate %0d%%: %0d packets not delivered", names[pat], RATES[r], exp_dst.size());
          end
          if (n_del == 0) failures++;
          else if (!mode)
            $display("  %-8s rate %.2f: %0d packets, avg latency %.2f cycles, avg hops %.2f, Trojan firings %0d, all intact",
                     names[pat], RATES[r] / 100.0, n_del, real'(lat_sum) / n_del,
                     real'(hop_sum) / n_del, n_fired);
          else begin
            // Without correction, Trojan-hit packets must arrive corrupted.
            checks += 2;
            if (n_bad == 0) failures++;
            if (jtec_en) failures++;
            $display("  %-8s rate %.2f: %0d intact (avg latency %.2f), %0d corrupted, %0d of them at the wrong node; reliability %.1f %%",
                     names[pat], RATES[r] / 100.0, n_del, real'(lat_sum) / n_del, n_bad, n_wrong_node,
                     100.0 * n_del / (n_del + n_bad));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
