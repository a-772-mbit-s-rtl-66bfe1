// Pruning-criteria checks unit: holds the single-tree-search metrics, decides which examined
// nodes survive, and produces the extrinsic LLRs.
//
// State: lam_map (metric of the best leaf so far), x_map (its bits) and, for every bit (j,b),
// lam_bar (smallest metric of a leaf seen with that bit flipped relative to x_map). A node on
// level l with metric M is kept when M < lam_eff(j,b) for at least one bit (j,b) it can still
// affect: every bit of the levels below l, the bits of level l and of the levels above in which
// its path differs from x_map. lam_eff = min(lam_bar, lam_map + clip) applies LLR clipping.
//
// Comparator sharing: per level j two reference metrics are formed once, A_j (largest lam_eff
// of the level) and D_j (largest lam_eff over the bits where the current path differs from
// x_map). They are shared by all M_T,max + 1 checks of a cycle (the child from the vertical
// step and the next sibling on each level from the horizontal steps); each check then needs one
// comparator per level, whose results are ORed. The candidate's own level uses a reference
// masked with the candidate's own bits. Each horizontal check also tests the level's lower bound
// lb against the largest reference any sibling could meet; failing that test (exh) means every
// remaining sibling on the level can be pruned at once, while a failing node test alone only
// prunes that node. Until the first leaf is found, no node is pruned.
//
// Leaf update (upd, registered): a leaf with a smaller metric than lam_map becomes the new map
// solution and the old lam_map becomes the counter-hypothesis metric of every bit that flips;
// otherwise the leaf lowers lam_bar of the bits in which it differs from x_map.
// LLR output (combinational): L^E = +/-(lam_eff - lam_map) - L^A, sign by x_map, saturated.
// The reference sharing follows the document; the lower-bound level test, strict comparisons
// and the widths are this design's choices.
module sd_prune #(
  parameter int unsigned MT_MAX = 4,
  parameter int unsigned Q_MAX  = 6,
  parameter int unsigned W_M    = 20,
  parameter int unsigned W_L    = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,                  // start of a new symbol vector
  input  logic [2:0]             mt,
  input  logic [3:0]             q,
  input  logic [W_M-1:0]         clip,
  input  logic [Q_MAX-1:0]       path_bits [MT_MAX],     // bits of the current path
  // vertical check
  input  logic [2:0]             v_lvl,
  input  logic [Q_MAX-1:0]       v_bits,
  input  logic [W_M-1:0]         v_mp,
  input  logic [W_M-1:0]         v_lb,
  output logic                   v_pass,
  output logic                   v_exh,
  // horizontal checks, one per level
  input  logic [Q_MAX-1:0]       h_bits [MT_MAX],
  input  logic [W_M-1:0]         h_mp   [MT_MAX],
  input  logic [W_M-1:0]         h_lb   [MT_MAX],
  output logic [MT_MAX-1:0]      h_pass,
  output logic [MT_MAX-1:0]      h_exh,
  // leaf update
  input  logic                   upd,
  input  logic [Q_MAX-1:0]       leaf_bits [MT_MAX],
  input  logic [W_M-1:0]         leaf_m,
  // results
  input  logic signed [W_L-1:0]  la [MT_MAX][Q_MAX],
  output logic                   map_valid,
  output logic [Q_MAX-1:0]       x_map [MT_MAX],
  output logic signed [W_L-1:0]  le  [MT_MAX][Q_MAX]
);
  logic [W_M-1:0] lam_map;
  logic [W_M-1:0] lam_bar [MT_MAX][Q_MAX];
  logic [W_M-1:0] lam_eff [MT_MAX][Q_MAX];
  logic [W_M-1:0] ref_a   [MT_MAX];
  logic [W_M-1:0] ref_d   [MT_MAX];
  logic [Q_MAX-1:0] bmask;
  localparam int unsigned LV = (MT_MAX > 1) ? $clog2(MT_MAX) : 1;

  assign bmask = Q_MAX'((1 << int'(q)) - 1);

  // Largest lam_eff of level j over the bits selected by m.
  function automatic logic [W_M-1:0] lvl_max(logic [W_M-1:0] v [Q_MAX], logic [Q_MAX-1:0] m);
    logic [W_M-1:0] r;
    r = '0;
    for (int b = 0; b < Q_MAX; b++)
      if (m[b] && v[b] > r) r = v[b];
    return r;
  endfunction

  // Clipping and the shared reference metrics.
  always_comb begin
    logic [W_M:0] lim;
    lim = (W_M+1)'(lam_map) + (W_M+1)'(clip);
    for (int j = 0; j < MT_MAX; j++) begin
      for (int b = 0; b < Q_MAX; b++)
        lam_eff[j][b] = (lim < (W_M+1)'(lam_bar[j][b])) ? lim[W_M-1:0] : lam_bar[j][b];
      if (j < int'(mt)) begin
        ref_a[j] = lvl_max(lam_eff[j], bmask);
        ref_d[j] = lvl_max(lam_eff[j], bmask & (path_bits[j] ^ x_map[j]));
      end else begin
        ref_a[j] = '0;
        ref_d[j] = '0;
      end
    end
  end

  // Node test: kept if its metric is below a reference of a level it can still affect.
  function automatic logic node_keep(int l, logic [W_M-1:0] m, logic [W_M-1:0] own);
    logic k;
    k = (m < own);
    for (int j = 0; j < MT_MAX; j++) begin
      if (j < l && m < ref_a[j]) k = 1'b1;
      if (j > l && m < ref_d[j]) k = 1'b1;
    end
    return k;
  endfunction

  // Level test: the lower bound of all remaining siblings against the largest reference.
  function automatic logic level_keep(int l, logic [W_M-1:0] m);
    logic k;
    k = 1'b0;
    for (int j = 0; j < MT_MAX; j++) begin
      if (j <= l && m < ref_a[j]) k = 1'b1;
      if (j > l && m < ref_d[j]) k = 1'b1;
    end
    return k;
  endfunction

  always_comb begin
    logic [W_M-1:0] own;
    own    = lvl_max(lam_eff[v_lvl[LV-1:0]], bmask & (v_bits ^ x_map[v_lvl[LV-1:0]]));
    v_pass = !map_valid || node_keep(int'(v_lvl), v_mp, own);
    v_exh  = map_valid && !level_keep(int'(v_lvl), v_lb);
    for (int l = 0; l < MT_MAX; l++) begin
      own       = lvl_max(lam_eff[l], bmask & (h_bits[l] ^ x_map[l]));
      h_pass[l] = !map_valid || node_keep(l, h_mp[l], own);
      h_exh[l]  = map_valid && !level_keep(l, h_lb[l]);
    end
  end

  // Extrinsic LLRs.
  always_comb begin
    logic signed [W_M+1:0] d, e;
    for (int j = 0; j < MT_MAX; j++) begin
      for (int b = 0; b < Q_MAX; b++) begin
        d = (W_M+2)'(lam_eff[j][b]) - (W_M+2)'(lam_map);
        if (!x_map[j][b]) d = -d;
        e = d - (W_M+2)'(la[j][b]);
        if (!map_valid || j >= int'(mt) || b >= int'(q)) le[j][b] = '0;
        else if (e > (W_M+2)'(2 ** (W_L - 1) - 1)) le[j][b] = W_L'(2 ** (W_L - 1) - 1);
        else if (e < -(W_M+2)'(2 ** (W_L - 1) - 1)) le[j][b] = -W_L'(2 ** (W_L - 1) - 1);
        else le[j][b] = W_L'(e);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lam_map   <= '1;
      map_valid <= 1'b0;
      for (int j = 0; j < MT_MAX; j++) begin
        x_map[j] <= '0;
        for (int b = 0; b < Q_MAX; b++) lam_bar[j][b] <= '1;
      end
    end else if (clear) begin
      lam_map   <= '1;
      map_valid <= 1'b0;
      for (int j = 0; j < MT_MAX; j++) begin
        x_map[j] <= '0;
        for (int b = 0; b < Q_MAX; b++) lam_bar[j][b] <= '1;
      end
    end else if (upd) begin
      if (!map_valid || leaf_m < lam_map) begin
        for (int j = 0; j < MT_MAX; j++)
          for (int b = 0; b < Q_MAX; b++)
            if (map_valid && leaf_bits[j][b] != x_map[j][b]) lam_bar[j][b] <= lam_map;
        lam_map   <= leaf_m;
        x_map     <= leaf_bits;
        map_valid <= 1'b1;
      end else begin
        for (int j = 0; j < MT_MAX; j++)
          for (int b = 0; b < Q_MAX; b++)
            if (leaf_bits[j][b] != x_map[j][b] && leaf_m < lam_bar[j][b]) lam_bar[j][b] <= leaf_m;
      end
    end
  end
endmodule
