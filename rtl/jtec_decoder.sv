// jtec_decoder: JTEC decoder for one 77-bit link word.
//
// The word is split into the two 38-bit Hamming copies A and B and the
// parity bit P0. For each copy the syndrome (SA, SB) and the parity (PA, PB)
// are computed. One copy is chosen:
//   SA == 0, P0 == PA             -> A (A is clean)
//   SA == 0, P0 != PA, SB == 0    -> B
//   SA == 0, P0 != PA, SB != 0    -> A
//   SA != 0, P0 == PA             -> B (an even number, >= 2, of errors in A)
//   SA != 0, P0 != PA, SB == 0    -> B
//   SA != 0, P0 != PA, SB != 0    -> A (a single error in A)
// and the chosen copy is passed through (38,32) Hamming single-error
// correction. Any pattern of up to three wrong wires among the 77 is
// corrected. The decision tree follows the method's JTEC decoding flow; the
// second syndrome test is on SB, which is what makes the code correct three
// errors.
//
// Outputs besides the corrected flit: error_o is set whenever any syndrome
// or parity check fails (the link delivered a corrupted word, whether or not
// it was corrected), chose_b_o shows which copy was used, and
// uncorrectable_o is set if the chosen copy's syndrome points outside the
// 38 code positions. Purely combinational, no latency.
module jtec_decoder
  import eccjr_pkg::*;
(
  input  link_word_t code_i,
  output flit_word_t data_o,
  output logic       error_o,
  output logic       chose_b_o,
  output logic       uncorrectable_o
);

  ham_cw_t   cw_a, cw_b, cw_sel;
  syndrome_t sa, sb, s_sel;
  logic      p0, pa, pb;

  always_comb begin
    cw_a = copy_a(code_i);
    cw_b = copy_b(code_i);
    p0   = code_i[LINK_W-1];
    sa   = ham_syndrome(cw_a);
    sb   = ham_syndrome(cw_b);
    pa   = ^cw_a;
    pb   = ^cw_b;

    if (sa == '0) chose_b_o = (p0 != pa) && (sb == '0);
    else          chose_b_o = (p0 == pa) || (sb == '0);

    cw_sel          = chose_b_o ? cw_b : cw_a;
    s_sel           = chose_b_o ? sb   : sa;
    data_o          = ham_extract(ham_correct(cw_sel, s_sel));
    uncorrectable_o = (s_sel > syndrome_t'(HAM_N));
    error_o         = (sa != '0) || (sb != '0) || (p0 != pa) || (p0 != pb);
  end

endmodule
