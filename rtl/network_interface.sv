// network_interface: network interface (NI) between a processing element
// and the local port of its router.
//
// TX: the element hands over a flit (destination, application ID, 16-bit
// payload); the NI writes its own coordinates into the source fields,
// JTEC-encodes the flit (the transmitter-side encoder of the method) and
// offers the 77-bit word to the router. tx_ready_o is the router's input
// ready, so the element sees back-pressure directly.
//
// RX: every word the router delivers is accepted (the NI is always ready)
// and checked by a jtec_decoder (the receiver-side syndrome check). One
// cycle later the NI presents the flit on rx_*: the corrected flit when
// jtec_en_i is high, otherwise the uncorrected copy A. rx_faulty_o marks a
// packet that arrived with a failing syndrome or parity check, which is
// what the threshold monitor counts; rx_misrouted_o marks a packet whose
// delivered destination is not this node. The handshake and flag timing are
// this design's choices. Synchronous active-low reset.
module network_interface
  import eccjr_pkg::*;
#(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       jtec_en_i,
  // processing element, transmit
  input  logic       tx_valid_i,
  input  flit_t      tx_flit_i,
  output logic       tx_ready_o,
  // router local port
  output logic       net_valid_o,
  output link_word_t net_word_o,
  input  logic       net_ready_i,
  input  logic       net_valid_i,
  input  link_word_t net_word_i,
  output logic       net_ready_o,
  // processing element, receive
  output logic       rx_valid_o,
  output flit_t      rx_flit_o,
  output logic       rx_faulty_o,
  output logic       rx_misrouted_o
);

  flit_t      tx_pkt;
  flit_word_t dec_flit;
  flit_t      got;
  logic       dec_err, unused_b, unused_u;

  always_comb begin
    tx_pkt       = tx_flit_i;
    tx_pkt.src_x = COORD_W'(X);
    tx_pkt.src_y = COORD_W'(Y);
  end

  jtec_encoder u_enc (.data_i(tx_pkt), .code_o(net_word_o));

  assign net_valid_o = tx_valid_i;
  assign tx_ready_o  = net_ready_i;
  assign net_ready_o = 1'b1;

  jtec_decoder u_dec (
    .code_i         (net_word_i),
    .data_o         (dec_flit),
    .error_o        (dec_err),
    .chose_b_o      (unused_b),
    .uncorrectable_o(unused_u)
  );

  always_comb got = jtec_en_i ? flit_t'(dec_flit) : flit_t'(raw_flit(net_word_i));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_valid_o     <= 1'b0;
      rx_flit_o      <= '0;
      rx_faulty_o    <= 1'b0;
      rx_misrouted_o <= 1'b0;
    end else begin
      rx_valid_o     <= net_valid_i;
      rx_faulty_o    <= net_valid_i && dec_err;
      rx_misrouted_o <= net_valid_i && (got.dst_x != COORD_W'(X) || got.dst_y != COORD_W'(Y));
      if (net_valid_i) rx_flit_o <= got;
    end
  end

endmodule
