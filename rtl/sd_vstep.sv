// Vertical-step unit: finds the first child (the one with the smallest partial metric M_P) of
// the current tree node.
//
// For target level k (one below the current node) it first cancels the interference of the
// symbols already fixed on the path, b_k = y~_k - sum_{j>k} R_kj s_j, and keeps b_k for the
// horizontal-step unit of that level (the precomputed M_C contribution the document mentions).
// Hybrid enumeration then only needs two candidates, found without sorting any metric:
//   * the M_C-best child, by slicing b_k / R_kk to the nearest constellation point per axis
//     (comparisons of b_k with R_kk times the decision thresholds, no division);
//   * the M_A-best child, the symbol given by the signs of the a-priori LLRs (M_A = 0).
// Two M_C units evaluate both; the one with the smaller M_P = M_P(parent) + M_C + M_A is the
// child (ties go to the M_C-best). Also returned are the zig-zag start (slice point and, per
// axis, the side of the slice point on which b_k lies) and the lower bound
// M_P(parent) + M_C(slice) + 0 on the metric of every child, used for the level-wide pruning test.
// Purely combinational; the choice of slicer, tie rule and widths are this design's own.
module sd_vstep #(
  parameter int unsigned MT_MAX   = 4,
  parameter int unsigned Q_MAX    = 6,
  parameter int unsigned W_Y      = 12,
  parameter int unsigned W_B      = 20,
  parameter int unsigned W_L      = 8,
  parameter int unsigned W_M      = 20,
  parameter int unsigned MC_SHIFT = 6
) (
  input  logic [2:0]              k,                          // target level 0..mt-1
  input  logic [2:0]              mt,
  input  logic [3:0]              q,
  input  logic signed [W_Y-1:0]   y_re   [MT_MAX],
  input  logic signed [W_Y-1:0]   y_im   [MT_MAX],
  input  logic signed [W_Y-1:0]   r_re   [MT_MAX][MT_MAX],
  input  logic signed [W_Y-1:0]   r_im   [MT_MAX][MT_MAX],
  input  logic [Q_MAX-1:0]        path_sym [MT_MAX],          // symbols fixed on levels > k
  input  logic signed [W_L-1:0]   la     [MT_MAX][Q_MAX],
  input  logic [W_M-1:0]          ma_row [2**Q_MAX],          // M_A row of level k
  input  logic [W_M-1:0]          pm_parent,
  output logic signed [W_B-1:0]   b_re,
  output logic signed [W_B-1:0]   b_im,
  output logic signed [W_Y-1:0]   rii,
  output logic [Q_MAX/2-1:0]      c_re,                       // slice point
  output logic [Q_MAX/2-1:0]      c_im,
  output logic                    up_re,                      // zig-zag starts upwards
  output logic                    up_im,
  output logic [W_M-1:0]          mc_slice,
  output logic [Q_MAX-1:0]        v_sym,
  output logic [W_M-1:0]          v_mp,
  output logic [W_M-1:0]          v_lb,
  output logic                    v_from_c                    // child is the M_C-best one
);
  import sd_pkg::*;
  localparam int unsigned QH = Q_MAX / 2;
  localparam int unsigned NP = 2 ** QH;
  localparam int unsigned W_T = W_B + 2;
  localparam int unsigned LV  = (MT_MAX > 1) ? $clog2(MT_MAX) : 1;

  logic [QH:0]       p;
  logic [QH-1:0]     a_re, a_im;
  logic [W_M-1:0]    mc_a;
  logic [W_M:0]      mp_c, mp_a, lb;

  function automatic logic [W_M-1:0] sat(logic [W_M:0] x);
    return x[W_M] ? {W_M{1'b1}} : x[W_M-1:0];
  endfunction

  always_comb begin
    int qh, ab;
    logic signed [W_T-1:0] acc_re, acc_im, thr;
    logic signed [QH+2:0]  s_re, s_im;
    s_re = '0;
    s_im = '0;
    thr  = '0;
    qh = int'(q) / 2;
    p  = (QH+1)'(1 << qh);
    // Interference cancellation.
    acc_re = W_T'(y_re[k[LV-1:0]]);
    acc_im = W_T'(y_im[k[LV-1:0]]);
    for (int j = 0; j < MT_MAX; j++) begin
      if (j > int'(k) && j < int'(mt)) begin
        s_re = $signed({2'b00, path_sym[j][QH-1:0], 1'b0}) - $signed({2'b00, p}) + 1;
        s_im = $signed({2'b00, path_sym[j][Q_MAX-1:QH], 1'b0}) - $signed({2'b00, p}) + 1;
        acc_re = acc_re - W_T'(r_re[k[LV-1:0]][j]) * W_T'(s_re) + W_T'(r_im[k[LV-1:0]][j]) * W_T'(s_im);
        acc_im = acc_im - W_T'(r_re[k[LV-1:0]][j]) * W_T'(s_im) - W_T'(r_im[k[LV-1:0]][j]) * W_T'(s_re);
      end
    end
    b_re = W_B'(acc_re);
    b_im = W_B'(acc_im);
    rii  = r_re[k[LV-1:0]][k[LV-1:0]];
    // Slicer: count thresholds -(p-2), ..., p-2 (times R_kk) lying below b.
    c_re = '0;
    c_im = '0;
    for (int m = 0; m < NP - 1; m++) begin
      if (m < int'(p) - 1) begin
        thr = W_T'(rii) * W_T'(2 * m - int'(p) + 2);
        if (W_T'(b_re) > thr) c_re = c_re + 1'b1;
        if (W_T'(b_im) > thr) c_im = c_im + 1'b1;
      end
    end
    up_re = W_T'(b_re) >= W_T'(rii) * W_T'(2 * int'(c_re) - int'(p) + 1);
    up_im = W_T'(b_im) >= W_T'(rii) * W_T'(2 * int'(c_im) - int'(p) + 1);
    // A-priori hard decision.
    ab = 0;
    for (int b = 0; b < Q_MAX; b++)
      if (b < int'(q) && la[k[LV-1:0]][b] > 0) ab = ab | (1 << b);
    a_re = QH'(gray_inv(ab & ((1 << qh) - 1)));
    a_im = QH'(gray_inv(ab >> qh));
  end

  sd_mc_unit #(.W_B(W_B), .W_R(W_Y), .W_M(W_M), .MC_SHIFT(MC_SHIFT), .QH(QH)) u_mc_c (
    .b_re, .b_im, .rii, .re_idx(c_re), .im_idx(c_im), .p, .mc(mc_slice));
  sd_mc_unit #(.W_B(W_B), .W_R(W_Y), .W_M(W_M), .MC_SHIFT(MC_SHIFT), .QH(QH)) u_mc_a (
    .b_re, .b_im, .rii, .re_idx(a_re), .im_idx(a_im), .p, .mc(mc_a));

  always_comb begin
    mp_c     = (W_M+1)'(pm_parent) + (W_M+1)'(mc_slice) + (W_M+1)'(ma_row[{c_im, c_re}]);
    mp_a     = (W_M+1)'(pm_parent) + (W_M+1)'(mc_a);
    lb       = (W_M+1)'(pm_parent) + (W_M+1)'(mc_slice);
    v_from_c = sat(mp_c) <= sat(mp_a);
    v_sym    = v_from_c ? {c_im, c_re} : {a_im, a_re};
    v_mp     = v_from_c ? sat(mp_c) : sat(mp_a);
    v_lb     = sat(lb);
  end
endmodule
