// noc_router: five-port mesh router (local, north, east, south, west) of the
// ECCJR network; with IS_JUNCTION set it is a junction router.
//
// Each input has a flit_fifo. The head flit of every input is routed by
// route_compute; each output has a round-robin arbiter (rr_arbiter) that
// picks one requesting input, and the chosen head is sent when the
// downstream buffer has room (out_ready_i). A flit written into an input
// buffer at one clock edge can leave at the next, so a hop costs one cycle.
// Packets are single flits; links carry the 77-bit JTEC word.
//
// Junction router (the method's addition): a jtec_decoder sits on every
// input and a jtec_encoder on every output. While jtec_en_i is low the
// decoders only check: the router routes on copy A and forwards the word
// untouched. Once jtec_en_i is high, the router routes on the corrected flit
// and sends a freshly encoded word, so link corruption of up to three wires
// is removed at each junction router. While correction is on, every word
// that enters the stretch towards this router is a clean code word (written
// by an NI or a junction router), so a decoder that then finds a bad word on
// a flit that leaves sets link_alarm_o of that input, which stays set until
// reset: the links from the previous encoder up to this input are
// controlled by a Trojan.
// A plain router (IS_JUNCTION = 0) has no decoders and routes on copy A.
//
// Simplifications against the evaluated router: one buffer per input, no
// virtual channels, no credit or allocation pipeline delays. The ready/valid
// link handshake is this design's choice. in_ready_o is "buffer not full".
// Synchronous active-low reset.
module noc_router
  import eccjr_pkg::*;
#(
  parameter int unsigned MESH_X      = 6,
  parameter int unsigned MESH_Y      = 6,
  parameter int unsigned X           = 0,
  parameter int unsigned Y           = 0,
  parameter logic [MESH_X*MESH_Y-1:0] JR_MAP = JR_MAP_6X6,
  parameter bit          IS_JUNCTION = 1'b0,
  parameter int unsigned DEPTH       = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       jtec_en_i,
  input  logic       in_valid_i  [NPORTS],
  input  link_word_t in_word_i   [NPORTS],
  output logic       in_ready_o  [NPORTS],
  output logic       out_valid_o [NPORTS],
  output link_word_t out_word_o  [NPORTS],
  input  logic       out_ready_i [NPORTS],
  output logic       link_alarm_o[NPORTS]
);

  link_word_t            head    [NPORTS];
  logic                  empty   [NPORTS];
  logic                  full    [NPORTS];
  logic                  pop     [NPORTS];
  flit_t                 rflit   [NPORTS];   // flit the route is computed on
  flit_word_t            cflit   [NPORTS];   // corrected flit (junction)
  port_e                 rport   [NPORTS];
  logic [NPORTS-1:0]     req     [NPORTS];   // indexed by output
  logic [NPORTS-1:0]     grant   [NPORTS];   // indexed by output
  link_word_t            enc_word[NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    flit_fifo #(.WIDTH(LINK_W), .DEPTH(DEPTH)) u_buf (
      .clk    (clk),
      .rst_n  (rst_n),
      .push_i (in_valid_i[i] && !full[i]),
      .wdata_i(in_word_i[i]),
      .pop_i  (pop[i]),
      .head_o (head[i]),
      .full_o (full[i]),
      .empty_o(empty[i])
    );
    assign in_ready_o[i] = !full[i];

    if (IS_JUNCTION) begin : g_dec
      logic derr, unused_b, unused_u;
      jtec_decoder u_dec (
        .code_i         (head[i]),
        .data_o         (cflit[i]),
        .error_o        (derr),
        .chose_b_o      (unused_b),
        .uncorrectable_o(unused_u)
      );
      assign rflit[i] = jtec_en_i ? flit_t'(cflit[i]) : flit_t'(raw_flit(head[i]));

      always_ff @(posedge clk) begin
        if (!rst_n)                 link_alarm_o[i] <= 1'b0;
        else if (pop[i] && derr && jtec_en_i) link_alarm_o[i] <= 1'b1;
      end
    end else begin : g_nodec
      assign cflit[i]        = raw_flit(head[i]);
      assign rflit[i]        = flit_t'(cflit[i]);
      assign link_alarm_o[i] = 1'b0;
    end

    route_compute #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(X), .Y(Y), .JR_MAP(JR_MAP)) u_rc (
      .dst_x_i(rflit[i].dst_x),
      .dst_y_i(rflit[i].dst_y),
      .port_o (rport[i])
    );
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = !empty[i] && (rport[i] == port_e'(o));
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk      (clk),
      .rst_n    (rst_n),
      .req_i    (req[o]),
      .advance_i(out_ready_i[o]),
      .grant_o  (grant[o])
    );

    link_word_t sel_word;
    always_comb begin
      sel_word = '0;
      for (int i = 0; i < NPORTS; i++)
        if (grant[o][i]) sel_word = head[i];
    end

    if (IS_JUNCTION) begin : g_enc
      flit_word_t sel_flit;
      always_comb begin
        sel_flit = '0;
        for (int i = 0; i < NPORTS; i++)
          if (grant[o][i]) sel_flit = cflit[i];
      end
      jtec_encoder u_enc (.data_i(sel_flit), .code_o(enc_word[o]));
    end else begin : g_noenc
      assign enc_word[o] = sel_word;
    end

    assign out_valid_o[o] = (grant[o] != '0);
    assign out_word_o[o]  = (IS_JUNCTION && jtec_en_i) ? enc_word[o] : sel_word;
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      pop[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (grant[o][i] && out_ready_i[o]) pop[i] = 1'b1;
    end
  end

endmodule
