// eccjr_pkg: types, constants and coding functions shared by the ECCJR
// network-on-chip (a mesh NoC that detects link Trojans and, once too many
// packets arrive corrupted, switches on triple-error-correcting link coding in
// a set of "junction routers").
//
// Flit. Packets are one flit of 32 bits (the width the JTEC code is defined
// on). The field layout is this design's own choice; the application ID field
// is the one the method adds to tell applications apart.
//   [31:28] app_id  [27:25] src_y  [24:22] src_x  [21:19] dst_y  [18:16] dst_x
//   [15:0]  payload
//
// Link word (77 bits). Every link carries the JTEC code of its flit:
//   - a shortened (38,32) Hamming code: code bit k holds code position k+1;
//     positions 1,2,4,8,16,32 are check bits, the other 32 positions hold the
//     data bits in ascending order;
//   - duplicate-add-parity: two copies A and B of the 38-bit code word plus
//     one parity bit P0 (even parity over one copy).
//   The copies are interleaved bit by bit (wire 2k = A[k], wire 2k+1 = B[k],
//   wire 76 = P0) so that neighbouring wires carry equal values, which is
//   the crosstalk-avoidance purpose of the duplication; the order is this
//   design's choice.
//
// Router ports: 0 = local (NI), 1 = north (y+1), 2 = east (x+1),
// 3 = south (y-1), 4 = west (x-1). Router r (numbered 1..36 in the method's
// figures, row by row from the south-west corner) sits at x = (r-1) % 6,
// y = (r-1) / 6; its index in packed vectors is r-1.
package eccjr_pkg;

  localparam int unsigned FLIT_W  = 32;
  localparam int unsigned HAM_N   = 38;
  localparam int unsigned HAM_K   = 32;
  localparam int unsigned HAM_R   = 6;
  localparam int unsigned LINK_W  = 2 * HAM_N + 1;   // 77
  localparam int unsigned COORD_W = 3;
  localparam int unsigned NPORTS  = 5;

  typedef logic [FLIT_W-1:0] flit_word_t;
  typedef logic [HAM_N-1:0]  ham_cw_t;
  typedef logic [LINK_W-1:0] link_word_t;
  typedef logic [HAM_R-1:0]  syndrome_t;

  typedef struct packed {
    logic [3:0]         app_id;
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
    logic [15:0]        payload;
  } flit_t;

  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  // Junction routers of the 6x6 mesh: routers 1, 6, 8, 11, 15, 16, 21, 22,
  // 25, 30, 32 and 35 (bit r-1 set).
  localparam logic [35:0] JR_MAP_6X6 = 36'h4_A130_C4A1;

  function automatic bit is_pow2(input int unsigned p);
    return (p != 0) && ((p & (p - 1)) == 0);
  endfunction

  // Code position (1-based) of data bit i.
  function automatic int unsigned data_pos(input int unsigned i);
    int unsigned n;
    n = 0;
    for (int unsigned p = 1; p <= HAM_N; p++) begin
      if (!is_pow2(p)) begin
        if (n == i) return p;
        n++;
      end
    end
    return 0;
  endfunction

  // Syndrome: XOR of the positions of all set code bits. Zero for a valid
  // code word, the position of the flipped bit after a single error.
  function automatic syndrome_t ham_syndrome(input ham_cw_t cw);
    syndrome_t s;
    s = '0;
    for (int unsigned p = 1; p <= HAM_N; p++)
      if (cw[p-1]) s ^= syndrome_t'(p);
    return s;
  endfunction

  function automatic ham_cw_t ham_encode(input flit_word_t d);
    ham_cw_t   cw;
    syndrome_t s;
    cw = '0;
    for (int unsigned i = 0; i < HAM_K; i++) cw[data_pos(i)-1] = d[i];
    s = ham_syndrome(cw);
    for (int unsigned j = 0; j < HAM_R; j++) cw[(1 << j) - 1] = s[j];
    return cw;
  endfunction

  function automatic flit_word_t ham_extract(input ham_cw_t cw);
    flit_word_t d;
    for (int unsigned i = 0; i < HAM_K; i++) d[i] = cw[data_pos(i)-1];
    return d;
  endfunction

  // Single-error correction: flip the bit the syndrome points to.
  function automatic ham_cw_t ham_correct(input ham_cw_t cw, input syndrome_t s);
    ham_cw_t c;
    c = cw;
    for (int unsigned p = 1; p <= HAM_N; p++)
      if (s == syndrome_t'(p)) c[p-1] = ~c[p-1];
    return c;
  endfunction

  function automatic link_word_t dap_pack(input ham_cw_t a, input ham_cw_t b, input logic p0);
    link_word_t w;
    for (int unsigned k = 0; k < HAM_N; k++) begin
      w[2*k]   = a[k];
      w[2*k+1] = b[k];
    end
    w[LINK_W-1] = p0;
    return w;
  endfunction

  function automatic ham_cw_t copy_a(input link_word_t w);
    ham_cw_t c;
    for (int unsigned k = 0; k < HAM_N; k++) c[k] = w[2*k];
    return c;
  endfunction

  function automatic ham_cw_t copy_b(input link_word_t w);
    ham_cw_t c;
    for (int unsigned k = 0; k < HAM_N; k++) c[k] = w[2*k+1];
    return c;
  endfunction

  // Full JTEC encoding of a flit.
  function automatic link_word_t jtec_encode(input flit_word_t d);
    ham_cw_t cw;
    cw = ham_encode(d);
    return dap_pack(cw, cw, ^cw);
  endfunction

  // The flit as read from copy A without any correction; what a router or
  // NI without an active decoder sees.
  function automatic flit_word_t raw_flit(input link_word_t w);
    return ham_extract(copy_a(w));
  endfunction

  // Link-word wire that carries data bit i of copy A (B is the next wire).
  function automatic int unsigned wire_of_data_a(input int unsigned i);
    return 2 * (data_pos(i) - 1);
  endfunction

endpackage
