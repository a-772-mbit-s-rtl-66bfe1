// Shared helpers of the soft-input soft-output single-tree-search sphere decoder.
//
// Symbols of a square Gray-mapped QAM constellation with P = 2^(Q/2) levels per axis are
// identified by a pair of axis indices (re_idx, im_idx), each 0..P-1, where index n stands for
// the amplitude 2n-(P-1) (odd integers). A symbol index packs them as {im_idx, re_idx} with
// Q_MAX/2 bits per field. The Q bits of a symbol are the Gray codes of the two indices, real
// part in bits 0..Q/2-1 and imaginary part in bits Q/2..Q-1; bit value 1 stands for the binary
// symbol x = +1, so a positive log-likelihood ratio favours a 1. All of this mapping is a choice
// of this design; the document only states that Q bits are mapped to a QAM point.
//
// The functions work on int so that cores with different Q_MAX can share them; they are pure
// combinational helpers.
package sd_pkg;

  // k-th point of the zig-zag enumeration of a P-level axis around index c. The first step goes
  // towards the side given by up (1: larger indices), then alternates; once one side is used up
  // the remaining points of the other side follow in order. Returns -1 for k >= p.
  function automatic int zz_idx(int c, logic up, int k, int p);
    int a, b, m, r;
    a = up ? (p - 1 - c) : c;
    b = up ? c : (p - 1 - c);
    m = (a < b) ? a : b;
    if (k >= p || k < 0) return -1;
    if (k == 0) return c;
    if (k <= 2 * m) begin
      if ((k % 2) == 1) return up ? c + (k + 1) / 2 : c - (k + 1) / 2;
      else              return up ? c - k / 2 : c + k / 2;
    end
    r = k - 2 * m;
    if (a > b) return up ? c + m + r : c - m - r;
    else       return up ? c - m - r : c + m + r;
  endfunction

  // Binary-reflected Gray code and its inverse (up to 8 bits).
  function automatic int gray(int n);
    return n ^ (n >> 1);
  endfunction

  function automatic int gray_inv(int g);
    int n;
    n = g;
    for (int s = 1; s < 8; s++) n = n ^ (g >> s);
    return n & 32'hff;
  endfunction

  // Bit labels of a symbol for run-time half-order qh = Q/2 (bit 0 in the LSB).
  function automatic int sym_bits(int re_idx, int im_idx, int qh);
    return gray(re_idx) | (gray(im_idx) << qh);
  endfunction

endpackage
