// ht_link_trojan: Hardware Trojan inserted on one NoC link.
//
// The link word passes through unchanged unless the Trojan is present
// (inserted_i, a model input that says whether this link carries a Trojan)
// and its trigger fires. The trigger (ht_trigger) reads four data bits of
// the flit from copy A of the link word; the payload corrupts the packet by
// inverting the link wires selected by PAYLOAD_MASK. Trigger and payload
// kind (a combinational trigger on packet data bits, data corruption as the
// payload) follow the method; bit choices are this design's.
//
// Default payload: three wires, namely the dst_x[0] bit (flit bit 16) in
// copies A and B and the payload[0] bit (flit bit 0) in copy A. A router
// without a decoder that reads copy A then sends the packet the wrong way
// and the data arrive wrong; JTEC corrects all three wires.
//
// Interface: valid_i qualifies word_i; word_o is the (possibly corrupted)
// word; fired_o flags a valid flit that was corrupted. Combinational.
module ht_link_trojan
  import eccjr_pkg::*;
#(
  parameter int unsigned TRIG_W     = 3,
  parameter int unsigned TRIG_X     = 7,
  parameter int unsigned TRIG_Y     = 11,
  parameter int unsigned TRIG_Z     = 15,
  parameter logic [15:0] TRUTH_TABLE = 16'h8000,
  parameter link_word_t  PAYLOAD_MASK =
      (link_word_t'(1) << wire_of_data_a(16)) | (link_word_t'(1) << (wire_of_data_a(16) + 1)) |
      (link_word_t'(1) << wire_of_data_a(0))
) (
  input  logic       inserted_i,
  input  logic       valid_i,
  input  link_word_t word_i,
  output link_word_t word_o,
  output logic       fired_o
);

  flit_word_t seen;
  logic       fire;

  always_comb seen = raw_flit(word_i);

  ht_trigger #(.TRUTH_TABLE(TRUTH_TABLE)) u_trigger (
    .w_i   (seen[TRIG_W]),
    .x_i   (seen[TRIG_X]),
    .y_i   (seen[TRIG_Y]),
    .z_i   (seen[TRIG_Z]),
    .fire_o(fire)
  );

  always_comb begin
    word_o  = (inserted_i && fire) ? (word_i ^ PAYLOAD_MASK) : word_i;
    fired_o = inserted_i && fire && valid_i;
  end

endmodule
