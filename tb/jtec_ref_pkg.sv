// jtec_ref_pkg: reference model of the JTEC link code used by the
// testbenches. It is written independently of the RTL coding functions:
// check bit j is the parity of every code position whose index has bit j
// set, and decoding tries every candidate single-bit fix by brute force.
package jtec_ref_pkg;

  // Code positions (1..38) that are not powers of two, in ascending order.
  function automatic int ref_data_pos(input int i);
    int p, n;
    n = -1;
    p = 0;
    while (n < i) begin
      p++;
      if ((p & (p - 1)) != 0) n++;
    end
    return p;
  endfunction

  function automatic logic [37:0] ref_ham(input logic [31:0] d);
    logic [37:0] cw;
    cw = '0;
    for (int i = 0; i < 32; i++) cw[ref_data_pos(i)-1] = d[i];
    for (int j = 0; j < 6; j++) begin
      logic par;
      par = 1'b0;
      for (int p = 1; p <= 38; p++)
        if (((p >> j) & 1) != 0 && ((p & (p - 1)) != 0)) par ^= cw[p-1];
      cw[(1 << j) - 1] = par;
    end
    return cw;
  endfunction

  function automatic logic [76:0] ref_jtec(input logic [31:0] d);
    logic [37:0] cw;
    logic [76:0] w;
    cw = ref_ham(d);
    for (int k = 0; k < 38; k++) begin
      w[2*k]   = cw[k];
      w[2*k+1] = cw[k];
    end
    w[76] = ^cw;
    return w;
  endfunction

  // Data bits of copy A, uncorrected.
  function automatic logic [31:0] ref_raw(input logic [76:0] w);
    logic [31:0] d;
    for (int i = 0; i < 32; i++) d[i] = w[2*(ref_data_pos(i)-1)];
    return d;
  endfunction

  // Flip `n` distinct random wires of a 77-bit word.
  function automatic logic [76:0] ref_flip(input logic [76:0] w, input int n);
    logic [76:0] m;
    m = '0;
    while ($countones(m) < n) m[$urandom_range(76, 0)] = 1'b1;
    return w ^ m;
  endfunction

endpackage
