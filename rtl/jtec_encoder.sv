// jtec_encoder: Joint crosstalk-avoidance and Triple Error Correction (JTEC)
// encoder for one 32-bit flit.
//
// The flit is first protected by a shortened (38,32) Hamming code (6 check
// bits at code positions 1, 2, 4, 8, 16, 32). The 38-bit code word is then
// sent twice (copies A and B) together with one parity bit P0 computed over
// a copy, giving 77 link bits (duplicate-add-parity). Code construction and
// sizes follow the method; the wire order of the 77 bits (A and B
// interleaved, P0 on the top wire) is this design's choice, see eccjr_pkg.
//
// Interface: data_i (32 bits) -> code_o (77 bits). Purely combinational, no
// clock, no latency.
module jtec_encoder
  import eccjr_pkg::*;
(
  input  flit_word_t data_i,
  output link_word_t code_o
);

  ham_cw_t   cw;
  syndrome_t chk;

  always_comb begin
    // Place the data bits, then set the check bits so that the syndrome of
    // the complete word is zero.
    cw = '0;
    for (int unsigned i = 0; i < HAM_K; i++) cw[data_pos(i)-1] = data_i[i];
    chk = ham_syndrome(cw);
    for (int unsigned j = 0; j < HAM_R; j++) cw[(1 << j) - 1] = chk[j];
    code_o = dap_pack(cw, cw, ^cw);
  end

endmodule
