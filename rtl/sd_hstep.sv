// Horizontal-step unit: enumerates, for every level of the tree, the siblings of the path node
// on that level (the children of the path node one level up) by hybrid enumeration.
//
// Two candidate lists run side by side, and the candidate with the smaller partial metric
// M_P = M_P(parent) + M_C + M_A is offered as the next sibling (ties go to the M_C list):
//   * M_C list, column-wise decomposition: the constellation is split into columns of constant
//     real part; inside a column the points follow a zig-zag over the imaginary part around the
//     slice point, which is exact M_C order. Columns are opened in zig-zag order of their real
//     part; a column that is not yet open cannot beat the next one to open, so the cache holds
//     the head metric of every open column plus that one frontier column. Only two M_C units
//     refresh it: unit 1 the column just consumed, unit 2 the new frontier when the frontier was
//     consumed. The list candidate is the minimum over the cache.
//   * M_A list: minimum search over the stored M_A of the level's unvisited symbols; a third
//     M_C unit evaluates this candidate.
// A symbol can be taken through either list; a visited symbol at the head of the M_C list is
// skipped when the M_A candidate is consumed. lb = M_P(parent) + min cached M_C + min M_A is a
// lower bound on the metric of every unvisited sibling, used for the level-wide pruning test.
//
// Sharing: a level's candidate changes only when that level is initialised or consumed, and at
// most one level is touched per cycle. So the enumeration state (visited mask, column counters,
// cache, b_i) is kept per level, but one datapath (the candidate search and the three M_C units)
// serves all levels: in the cycle after a level was touched it computes that level's candidate,
// which is offered directly and stored; the other levels offer their stored candidates.
//
// Interface: init (one cycle, level init_lvl) loads a level from the vertical-step unit with its
// first child already visited; consume (one cycle, level cons_lvl) marks that level's offered
// candidate visited and advances its lists. The new candidate of the touched level is offered
// in the next cycle. Column decomposition, zig-zag order, two cache M_C units and the cache
// follow the document; the unreduced minimum search over M_A is this design's choice.
module sd_hstep #(
  parameter int unsigned MT_MAX   = 4,
  parameter int unsigned Q_MAX    = 6,
  parameter int unsigned W_Y      = 12,
  parameter int unsigned W_B      = 20,
  parameter int unsigned W_M      = 20,
  parameter int unsigned MC_SHIFT = 6,
  localparam int unsigned LV      = (MT_MAX > 1) ? $clog2(MT_MAX) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    init,
  input  logic [LV-1:0]           init_lvl,
  input  logic                    consume,
  input  logic [LV-1:0]           cons_lvl,
  input  logic [3:0]              q,
  // from the vertical-step unit (sampled on init)
  input  logic signed [W_B-1:0]   i_b_re,
  input  logic signed [W_B-1:0]   i_b_im,
  input  logic signed [W_Y-1:0]   i_rii,
  input  logic [Q_MAX/2-1:0]      i_c_re,
  input  logic [Q_MAX/2-1:0]      i_c_im,
  input  logic                    i_up_re,
  input  logic                    i_up_im,
  input  logic [W_M-1:0]          i_mc_slice,
  input  logic [W_M-1:0]          i_pm_parent,
  input  logic [Q_MAX-1:0]        i_v_sym,
  input  logic                    i_v_from_c,
  // M_A storage
  input  logic [W_M-1:0]          ma [MT_MAX][2**Q_MAX],
  // offered sibling per level
  output logic [MT_MAX-1:0]       cand_valid,
  output logic [Q_MAX-1:0]        cand_sym [MT_MAX],
  output logic [W_M-1:0]          cand_mp  [MT_MAX],
  output logic [W_M-1:0]          lb       [MT_MAX]
);
  import sd_pkg::*;
  localparam int unsigned QH = Q_MAX / 2;
  localparam int unsigned NP = 2 ** QH;
  localparam int unsigned NS = 2 ** Q_MAX;

  // Per-level enumeration state.
  logic signed [W_B-1:0] b_re [MT_MAX], b_im [MT_MAX];
  logic signed [W_Y-1:0] rii  [MT_MAX];
  logic [QH-1:0]         c_re [MT_MAX], c_im [MT_MAX];
  logic [MT_MAX-1:0]     up_re, up_im;
  logic [W_M-1:0]        pm   [MT_MAX];
  logic [QH:0]           zc   [MT_MAX][NP];  // points consumed per column (zig-zag position)
  logic [QH:0]           nopen [MT_MAX];     // columns opened; column nopen is the frontier
  logic [W_M-1:0]        cache [MT_MAX][NP];
  logic [NS-1:0]         visited [MT_MAX];

  // Stored candidates.
  logic [MT_MAX-1:0]     sq_valid, sq_adv_c;
  logic [Q_MAX-1:0]      sq_sym [MT_MAX];
  logic [W_M-1:0]        sq_mp  [MT_MAX], sq_lb [MT_MAX];
  logic [QH-1:0]         sq_cck [MT_MAX];

  // Level whose candidate is computed by the shared datapath this cycle.
  logic                  dirty;
  logic [LV-1:0]         dl;

  logic [QH:0]           p;
  logic                  cc_valid, cc_stale, ca_valid, use_c, adv_c;
  logic [QH-1:0]         cc_k;
  logic [W_M-1:0]        cc_mc, ca_ma, ca_mc;
  logic [Q_MAX-1:0]      cc_sym, ca_sym;
  logic [W_M:0]          mp_c, mp_a, lb_w;
  logic                  d_valid;
  logic [Q_MAX-1:0]      d_sym;
  logic [W_M-1:0]        d_mp, d_lb;

  // Consumed level and its list state.
  logic [LV-1:0]         cl;
  logic [Q_MAX-1:0]      c_sym;
  logic                  c_adv;
  logic [QH-1:0]         c_k;
  logic                  c_ok;

  // Cache-refresh M_C unit operands.
  logic signed [W_B-1:0] u_b_re, u_b_im;
  logic signed [W_Y-1:0] u_rii;
  logic [QH-1:0]         u1_re, u1_im, u2_re, u2_im;
  logic [W_M-1:0]        u1_mc, u2_mc;

  function automatic logic [W_M-1:0] sat(logic [W_M:0] x);
    return x[W_M] ? {W_M{1'b1}} : x[W_M-1:0];
  endfunction

  function automatic logic [QH-1:0] clamp_idx(int v);
    return (v < 0) ? '0 : QH'(v);
  endfunction

  assign p = (QH+1)'(1 << (int'(q) / 2));

  // Shared datapath, M_C list head of level dl: minimum over its cached column heads.
  always_comb begin
    int hr, hi;
    cc_valid = 1'b0;
    cc_k     = '0;
    cc_mc    = '1;
    for (int k = 0; k < NP; k++) begin
      if (k <= int'(nopen[dl]) && k < int'(p) && int'(zc[dl][k]) < int'(p)) begin
        if (!cc_valid || cache[dl][k] < cc_mc) begin
          cc_valid = 1'b1;
          cc_k     = QH'(k);
          cc_mc    = cache[dl][k];
        end
      end
    end
    hr       = zz_idx(int'(c_re[dl]), up_re[dl], int'(cc_k), int'(p));
    hi       = zz_idx(int'(c_im[dl]), up_im[dl], int'(zc[dl][cc_k]), int'(p));
    cc_sym   = {clamp_idx(hi), clamp_idx(hr)};
    cc_stale = visited[dl][cc_sym];
  end

  // Shared datapath, M_A list head of level dl: minimum over its unvisited symbols.
  always_comb begin
    ca_valid = 1'b0;
    ca_sym   = '0;
    ca_ma    = '1;
    for (int s = 0; s < NS; s++) begin
      if (!visited[dl][s] && (!ca_valid || ma[dl][s] < ca_ma)) begin
        ca_valid = 1'b1;
        ca_sym   = Q_MAX'(s);
        ca_ma    = ma[dl][s];
      end
    end
  end

  sd_mc_unit #(.W_B(W_B), .W_R(W_Y), .W_M(W_M), .MC_SHIFT(MC_SHIFT), .QH(QH)) u_mc_a (
    .b_re(b_re[dl]), .b_im(b_im[dl]), .rii(rii[dl]), .re_idx(ca_sym[QH-1:0]),
    .im_idx(ca_sym[Q_MAX-1:QH]), .p, .mc(ca_mc));

  // Hybrid selection for level dl, and the candidates offered on every level.
  always_comb begin
    mp_c    = (W_M+1)'(pm[dl]) + (W_M+1)'(cc_mc) + (W_M+1)'(ma[dl][cc_sym]);
    mp_a    = (W_M+1)'(pm[dl]) + (W_M+1)'(ca_mc) + (W_M+1)'(ca_ma);
    lb_w    = (W_M+1)'(pm[dl]) + (W_M+1)'(cc_valid ? cc_mc : '1) + (W_M+1)'(ca_ma);
    use_c   = cc_valid && !cc_stale && (!ca_valid || sat(mp_c) <= sat(mp_a));
    adv_c   = cc_valid && (use_c || cc_stale);
    d_valid = ca_valid;
    d_sym   = use_c ? cc_sym : ca_sym;
    d_mp    = use_c ? sat(mp_c) : sat(mp_a);
    d_lb    = sat(lb_w);
    for (int l = 0; l < MT_MAX; l++) begin
      if (dirty && l == int'(dl)) begin
        cand_valid[l] = d_valid;
        cand_sym[l]   = d_sym;
        cand_mp[l]    = d_mp;
        lb[l]         = d_lb;
      end else begin
        cand_valid[l] = sq_valid[l];
        cand_sym[l]   = sq_sym[l];
        cand_mp[l]    = sq_mp[l];
        lb[l]         = sq_lb[l];
      end
    end
  end

  // Offered candidate and list state of the level being consumed.
  always_comb begin
    cl    = cons_lvl;
    c_sym = (dirty && cl == dl) ? d_sym : sq_sym[cl];
    c_adv = (dirty && cl == dl) ? adv_c : sq_adv_c[cl];
    c_k   = (dirty && cl == dl) ? cc_k : sq_cck[cl];
    c_ok  = (dirty && cl == dl) ? d_valid : sq_valid[cl];
  end

  // The two cache-refresh M_C units: on init they fill the first entries of the initialised
  // level, on consume they refresh the consumed column and the new frontier.
  always_comb begin
    int r1, i1, r2;
    if (init) begin
      u_b_re = i_b_re;
      u_b_im = i_b_im;
      u_rii  = i_rii;
      r1 = int'(i_c_re);
      i1 = zz_idx(int'(i_c_im), i_up_im, 1, int'(p));
      r2 = zz_idx(int'(i_c_re), i_up_re, 1, int'(p));
      u2_im = i_c_im;
    end else begin
      u_b_re = b_re[cl];
      u_b_im = b_im[cl];
      u_rii  = rii[cl];
      r1 = zz_idx(int'(c_re[cl]), up_re[cl], int'(c_k), int'(p));
      i1 = zz_idx(int'(c_im[cl]), up_im[cl], int'(zc[cl][c_k]) + 1, int'(p));
      r2 = zz_idx(int'(c_re[cl]), up_re[cl], int'(nopen[cl]) + 1, int'(p));
      u2_im = c_im[cl];
    end
    u1_re = clamp_idx(r1);
    u1_im = clamp_idx(i1);
    u2_re = clamp_idx(r2);
  end

  sd_mc_unit #(.W_B(W_B), .W_R(W_Y), .W_M(W_M), .MC_SHIFT(MC_SHIFT), .QH(QH)) u_mc_1 (
    .b_re(u_b_re), .b_im(u_b_im), .rii(u_rii), .re_idx(u1_re), .im_idx(u1_im), .p, .mc(u1_mc));
  sd_mc_unit #(.W_B(W_B), .W_R(W_Y), .W_M(W_M), .MC_SHIFT(MC_SHIFT), .QH(QH)) u_mc_2 (
    .b_re(u_b_re), .b_im(u_b_im), .rii(u_rii), .re_idx(u2_re), .im_idx(u2_im), .p, .mc(u2_mc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dirty <= 1'b0;
      dl    <= '0;
      up_re <= '0; up_im <= '0;
      sq_valid <= '0; sq_adv_c <= '0;
      for (int l = 0; l < MT_MAX; l++) begin
        b_re[l] <= '0; b_im[l] <= '0; rii[l] <= '0;
        c_re[l] <= '0; c_im[l] <= '0; pm[l] <= '0; nopen[l] <= '0; visited[l] <= '1;
        sq_sym[l] <= '0; sq_mp[l] <= '0; sq_lb[l] <= '0; sq_cck[l] <= '0;
        for (int k = 0; k < NP; k++) begin
          zc[l][k]    <= '0;
          cache[l][k] <= '1;
        end
      end
    end else begin
      // store the candidate computed for the level touched in the previous cycle
      if (dirty) begin
        sq_valid[dl] <= d_valid;
        sq_sym[dl]   <= d_sym;
        sq_mp[dl]    <= d_mp;
        sq_lb[dl]    <= d_lb;
        sq_cck[dl]   <= cc_k;
        sq_adv_c[dl] <= adv_c;
      end
      dirty <= init || (consume && c_ok);
      if (init) begin
        dl <= init_lvl;
        b_re[init_lvl] <= i_b_re; b_im[init_lvl] <= i_b_im;
        rii[init_lvl]  <= i_rii;
        c_re[init_lvl] <= i_c_re; c_im[init_lvl] <= i_c_im;
        up_re[init_lvl] <= i_up_re; up_im[init_lvl] <= i_up_im;
        pm[init_lvl]   <= i_pm_parent;
        for (int s = 0; s < NS; s++)
          visited[init_lvl][s] <= (s % NP) >= int'(p) || (s / NP) >= int'(p) ||
                                          s == int'(i_v_sym);
        for (int k = 0; k < NP; k++) begin
          zc[init_lvl][k]    <= '0;
          cache[init_lvl][k] <= '1;
        end
        if (i_v_from_c) begin
          zc[init_lvl][0]    <= (QH+1)'(1);
          nopen[init_lvl]    <= (QH+1)'(1);
          cache[init_lvl][0] <= u1_mc;
          if (NP > 1) cache[init_lvl][1] <= u2_mc;
        end else begin
          nopen[init_lvl]    <= '0;
          cache[init_lvl][0] <= i_mc_slice;
        end
      end else if (consume && c_ok) begin
        dl <= cl;
        visited[cl][c_sym] <= 1'b1;
        if (c_adv) begin
          zc[cl][c_k]    <= zc[cl][c_k] + 1'b1;
          cache[cl][c_k] <= u1_mc;
          if ((QH+1)'(c_k) == nopen[cl]) begin
            nopen[cl] <= nopen[cl] + 1'b1;
            if (int'(nopen[cl]) + 1 < NP) cache[cl][int'(nopen[cl]) + 1] <= u2_mc;
          end
        end
      end
    end
  end
endmodule
