// M_C computation unit: channel-based metric increment of one candidate symbol on one tree level.
//
// Given the interference-cancelled received value b_i = y~_i - sum_{j>i} R_ij s_j (computed and
// stored by the vertical-step unit), the real positive diagonal entry R_ii and a candidate symbol
// (re_idx, im_idx), it returns M_C = |b_i - R_ii s|^2 / 2^MC_SHIFT, saturated to W_M bits. The
// symbol amplitude on each axis is 2*idx-(P-1) for the run-time number p of levels per axis.
// The inputs are assumed to be pre-scaled by 1/sqrt(N0) by the preprocessing, so that M_C is in
// the same units as the a-priori LLRs; that scaling and all word widths are choices of this
// design. Purely combinational: one unit evaluates one candidate per cycle.
module sd_mc_unit #(
  parameter int unsigned W_B      = 20,  // width of b (signed)
  parameter int unsigned W_R      = 12,  // width of R_ii (signed, non-negative)
  parameter int unsigned W_M      = 20,  // metric width (unsigned, saturating)
  parameter int unsigned MC_SHIFT = 6,   // metric scaling shift
  parameter int unsigned QH       = 3    // bits per axis index (Q_MAX/2)
) (
  input  logic signed [W_B-1:0] b_re,
  input  logic signed [W_B-1:0] b_im,
  input  logic signed [W_R-1:0] rii,
  input  logic        [QH-1:0]  re_idx,
  input  logic        [QH-1:0]  im_idx,
  input  logic        [QH:0]    p,        // run-time levels per axis, 2..2^QH
  output logic        [W_M-1:0] mc
);
  localparam int unsigned W_E = W_B + W_R + QH + 2;
  localparam int unsigned W_SQ = 2 * W_E + 1;

  logic signed [QH+2:0]   s_re, s_im;
  logic signed [W_E-1:0]  e_re, e_im;
  logic signed [2*W_E-1:0] p_re, p_im;
  logic        [W_SQ-1:0] sq;
  logic        [W_SQ-1:0] sh;

  always_comb begin
    s_re = $signed({2'b00, re_idx, 1'b0}) - $signed({2'b00, p}) + 1;
    s_im = $signed({2'b00, im_idx, 1'b0}) - $signed({2'b00, p}) + 1;
    e_re = W_E'(b_re) - W_E'(rii) * W_E'(s_re);
    e_im = W_E'(b_im) - W_E'(rii) * W_E'(s_im);
    p_re = (2*W_E)'(e_re) * (2*W_E)'(e_re);
    p_im = (2*W_E)'(e_im) * (2*W_E)'(e_im);
    sq   = W_SQ'(unsigned'(p_re)) + W_SQ'(unsigned'(p_im));
    sh   = sq >> MC_SHIFT;
    mc   = (sh > W_SQ'({W_M{1'b1}})) ? {W_M{1'b1}} : sh[W_M-1:0];
  end
endmodule
