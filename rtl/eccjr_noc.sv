// eccjr_noc: the ECCJR network-on-chip, a MESH_X x MESH_Y mesh (6 x 6 by
// default) that detects Hardware Trojans on its links and avoids their
// effect with error-correcting junction routers.
//
// Structure: one noc_router and one network_interface per node. Routers
// marked in JR_MAP are junction routers (JTEC decoders on their inputs,
// encoders on their outputs); the default map is the twelve junction
// routers 1, 6, 8, 11, 15, 16, 21, 22, 25, 30, 32, 35 of the 6x6 network.
// Every router-to-router link passes through an ht_link_trojan site;
// ht_insert_i says which sites hold a Trojan (bit 4*n + d - 1 for the link
// leaving node n = y*MESH_X + x towards d = 1 north, 2 east, 3 south,
// 4 west). A single threshold_monitor counts the packets delivered by all
// NIs and the faulty ones among them; when THRESHOLD_PCT percent (20 %) are
// faulty it raises jtec_en_o, which turns on correction in all junction
// routers and NIs.
//
// Operation. Before the threshold is met, Trojan-corrupted packets travel
// unprotected: routers route on the corrupted header, packets may end at
// the wrong node, and the receiving NI flags them faulty. Afterwards every
// junction router rewrites each passing word as a clean JTEC word, and the
// receiving NI corrects the last stretch, so up to three corrupted wires
// per junction-to-junction stretch are removed. link_alarm_o (bit 5*n + p)
// is set for a junction-router input p on which a corrupted word arrived,
// naming that link as attacked.
//
// Ports are per node: a processing element offers a flit on tx_* (source
// fields are filled in by the NI) and receives one on rx_* a cycle after it
// leaves the router. A hop costs one clock cycle. Synchronous active-low
// reset. Mesh size, junction map, buffer depth and threshold are
// parameters; the NoC microarchitecture around the method (single-flit
// packets, one buffer per input, ready/valid links) is this design's.
module eccjr_noc
  import eccjr_pkg::*;
#(
  parameter int unsigned MESH_X        = 6,
  parameter int unsigned MESH_Y        = 6,
  parameter logic [MESH_X*MESH_Y-1:0] JR_MAP = JR_MAP_6X6,
  parameter int unsigned DEPTH         = 8,
  parameter int unsigned THRESHOLD_PCT = 20,
  parameter int unsigned MIN_PACKETS   = 64,
  parameter int unsigned CNT_W         = 24,
  parameter logic [15:0] HT_TRUTH_TABLE = 16'h8000,
  localparam int unsigned NN           = MESH_X * MESH_Y
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NN-1:0]        tx_valid_i,
  input  flit_t                tx_flit_i   [NN],
  output logic [NN-1:0]        tx_ready_o,
  output logic [NN-1:0]        rx_valid_o,
  output flit_t                rx_flit_o   [NN],
  output logic [NN-1:0]        rx_faulty_o,
  output logic [NN-1:0]        rx_misrouted_o,
  input  logic [4*NN-1:0]      ht_insert_i,
  output logic [4*NN-1:0]      ht_fired_o,
  output logic [NPORTS*NN-1:0] link_alarm_o,
  output logic                 jtec_en_o,
  output logic [CNT_W-1:0]     pkt_total_o,
  output logic [CNT_W-1:0]     pkt_faulty_o
);

  logic       in_valid  [NN][NPORTS];
  link_word_t in_word   [NN][NPORTS];
  logic       in_ready  [NN][NPORTS];
  logic       out_valid [NN][NPORTS];
  link_word_t out_word  [NN][NPORTS];
  logic       out_ready [NN][NPORTS];
  logic       alarm     [NN][NPORTS];
  link_word_t link_word [NN][NPORTS];   // out_word after the Trojan site

  threshold_monitor #(
    .N_NODES(NN), .THRESHOLD_PCT(THRESHOLD_PCT), .MIN_PACKETS(MIN_PACKETS), .CNT_W(CNT_W)
  ) u_monitor (
    .clk        (clk),
    .rst_n      (rst_n),
    .rx_valid_i (rx_valid_o),
    .rx_faulty_i(rx_faulty_o),
    .jtec_en_o  (jtec_en_o),
    .total_o    (pkt_total_o),
    .faulty_o   (pkt_faulty_o)
  );

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      noc_router #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(x), .Y(y), .JR_MAP(JR_MAP),
        .IS_JUNCTION(JR_MAP[N]), .DEPTH(DEPTH)
      ) u_router (
        .clk         (clk),
        .rst_n       (rst_n),
        .jtec_en_i   (jtec_en_o),
        .in_valid_i  (in_valid[N]),
        .in_word_i   (in_word[N]),
        .in_ready_o  (in_ready[N]),
        .out_valid_o (out_valid[N]),
        .out_word_o  (out_word[N]),
        .out_ready_i (out_ready[N]),
        .link_alarm_o(alarm[N])
      );

      network_interface #(.X(x), .Y(y)) u_ni (
        .clk           (clk),
        .rst_n         (rst_n),
        .jtec_en_i     (jtec_en_o),
        .tx_valid_i    (tx_valid_i[N]),
        .tx_flit_i     (tx_flit_i[N]),
        .tx_ready_o    (tx_ready_o[N]),
        .net_valid_o   (in_valid[N][PORT_LOCAL]),
        .net_word_o    (in_word[N][PORT_LOCAL]),
        .net_ready_i   (in_ready[N][PORT_LOCAL]),
        .net_valid_i   (out_valid[N][PORT_LOCAL]),
        .net_word_i    (out_word[N][PORT_LOCAL]),
        .net_ready_o   (out_ready[N][PORT_LOCAL]),
        .rx_valid_o    (rx_valid_o[N]),
        .rx_flit_o     (rx_flit_o[N]),
        .rx_faulty_o   (rx_faulty_o[N]),
        .rx_misrouted_o(rx_misrouted_o[N])
      );

      for (genvar p = 0; p < NPORTS; p++) begin : g_alarm
        assign link_alarm_o[NPORTS*N + p] = alarm[N][p];
      end

      // Outgoing links towards north, east, south and west.
      for (genvar d = 1; d < NPORTS; d++) begin : g_link
        localparam bit HAS_NB = (d == 1) ? (y + 1 < MESH_Y) :
                                (d == 2) ? (x + 1 < MESH_X) :
                                (d == 3) ? (y > 0) : (x > 0);
        localparam int unsigned NB = (d == 1) ? N + MESH_X :
                                     (d == 2) ? N + 1 :
                                     (d == 3) ? N - MESH_X : N - 1;
        localparam int unsigned OPP = (d == 1) ? 3 : (d == 2) ? 4 : (d == 3) ? 1 : 2;
        if (HAS_NB) begin : g_nb
          ht_link_trojan #(.TRUTH_TABLE(HT_TRUTH_TABLE)) u_ht (
            .inserted_i(ht_insert_i[4*N + d - 1]),
            .valid_i   (out_valid[N][d] && out_ready[N][d]),
            .word_i    (out_word[N][d]),
            .word_o    (link_word[N][d]),
            .fired_o   (ht_fired_o[4*N + d - 1])
          );
          assign in_valid[NB][OPP]  = out_valid[N][d];
          assign in_word[NB][OPP]   = link_word[N][d];
          assign out_ready[N][d]    = in_ready[NB][OPP];
        end else begin : g_edge
          // Mesh edge: nothing arrives, nothing may leave.
          assign in_valid[N][d]          = 1'b0;
          assign in_word[N][d]           = '0;
          assign out_ready[N][d]         = 1'b0;
          assign link_word[N][d]         = '0;
          assign ht_fired_o[4*N + d - 1] = 1'b0;
        end
      end
    end
  end

endmodule
