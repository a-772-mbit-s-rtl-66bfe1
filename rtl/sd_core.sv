// Soft-input soft-output single-tree-search (STS) sphere decoder core.
//
// One core detects one MIMO symbol vector at a time: from the QR-preprocessed receive vector
// y~ = Q^H y, the upper-triangular R (real positive diagonal) and the a-priori LLRs of all
// coded bits it returns the max-log extrinsic LLRs L^E of all M_T*Q bits and the hard map bits.
// The tree has one level per transmit antenna (level mt-1 at the top, level 0 holds the leaves)
// and 2^Q children per node. It is searched depth-first, one examined node per cycle:
//   * sd_vstep proposes the first child of the current node;
//   * sd_hstep proposes the next sibling on every level;
//   * sd_prune checks the child and all siblings of the current path concurrently.
// The next node is the child if it survives; otherwise the deepest level with a surviving
// sibling. A child or sibling that fails only its own test is marked visited (its level stays
// open), a level whose lower bound fails is closed, and the search ends when every level is
// closed. Reaching a leaf updates the STS metrics in sd_prune. sd_ma_storage computes the a-priori
// metrics one level per cycle alongside the first cycles of the search.
//
// Control: IDLE accepts a vector (in_valid && in_ready) into the input registers, then SEARCH
// runs until the tree is exhausted or the optional cycle limit (in_max_cyc, 0 = none, applied
// once a first leaf exists) is hit, and the result is written to the output registers
// (out_valid until out_ready). in_ready is high in IDLE while the output register is free or
// being read, so back-to-back vectors take M_T + 2 cycles at best: one load cycle, M_T cycles
// down to the first leaf and one cycle in which every remaining sibling is pruned. out_cycles
// reports the cycles spent on the vector (load plus search), saturating at 2^W_CYC-1.
//
// Run-time configuration: in_mt antennas (1..MT_MAX), in_q bits per symbol (2..Q_MAX, even),
// in_clip (LLR clipping level in metric units). The search structure, concurrent checks and
// run-time configurability follow the document; the handshakes, number formats, metric scaling
// and the cycle limit as the run-time constraint are this design's choices.
module sd_core #(
  parameter int unsigned MT_MAX   = 4,
  parameter int unsigned Q_MAX    = 6,
  parameter int unsigned W_Y      = 12,  // y~ and R entries, signed
  parameter int unsigned W_L      = 8,   // LLRs, signed
  parameter int unsigned W_M      = 20,  // metrics, unsigned saturating
  parameter int unsigned MC_SHIFT = 6,   // M_C = |e|^2 / 2^MC_SHIFT
  parameter int unsigned W_CYC    = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [2:0]             in_mt,
  input  logic [3:0]             in_q,
  input  logic [W_M-1:0]         in_clip,
  input  logic [W_CYC-1:0]       in_max_cyc,
  input  logic signed [W_Y-1:0]  in_y_re [MT_MAX],
  input  logic signed [W_Y-1:0]  in_y_im [MT_MAX],
  input  logic signed [W_Y-1:0]  in_r_re [MT_MAX][MT_MAX],
  input  logic signed [W_Y-1:0]  in_r_im [MT_MAX][MT_MAX],
  input  logic signed [W_L-1:0]  in_la   [MT_MAX][Q_MAX],
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic signed [W_L-1:0]  out_le  [MT_MAX][Q_MAX],
  output logic [Q_MAX-1:0]       out_xmap [MT_MAX],
  output logic [W_CYC-1:0]       out_cycles
);
  import sd_pkg::*;
  localparam int unsigned QH  = Q_MAX / 2;
  localparam int unsigned NS  = 2 ** Q_MAX;
  localparam int unsigned W_B = W_Y + 8;
  localparam int unsigned LV  = (MT_MAX > 1) ? $clog2(MT_MAX) : 1;

  typedef enum logic [0:0] {S_IDLE, S_SEARCH} state_t;
  state_t state;

  // Input registers.
  logic [2:0]             mt;
  logic [3:0]             q;
  logic [W_M-1:0]         clip;
  logic [W_CYC-1:0]       max_cyc;
  logic signed [W_Y-1:0]  y_re [MT_MAX], y_im [MT_MAX];
  logic signed [W_Y-1:0]  r_re [MT_MAX][MT_MAX], r_im [MT_MAX][MT_MAX];
  logic signed [W_L-1:0]  la   [MT_MAX][Q_MAX];

  // Tree-search state.
  logic [2:0]             cur;          // level of the current node, mt = root
  logic                   vpend;        // first child of the current node not yet examined
  logic [MT_MAX-1:0]      act;          // levels whose sibling enumeration is open
  logic [Q_MAX-1:0]       path_sym [MT_MAX];
  logic [W_M-1:0]         path_pm  [MT_MAX];
  logic [W_CYC-1:0]       cyc;

  logic                   accept;
  logic [W_M-1:0]         ma [MT_MAX][NS];
  logic [MT_MAX-1:0]      ma_ok;
  logic [Q_MAX-1:0]       path_bits [MT_MAX];
  logic signed [W_L-1:0]  la_src [MT_MAX][Q_MAX];
  logic [W_M-1:0]         pm_cur;
  logic [2:0]             k;

  // Vertical step.
  logic                   v_req;
  logic signed [W_B-1:0]  v_b_re, v_b_im;
  logic signed [W_Y-1:0]  v_rii;
  logic [QH-1:0]          v_c_re, v_c_im;
  logic                   v_up_re, v_up_im, v_from_c;
  logic [W_M-1:0]         v_mc_slice, v_mp, v_lb;
  logic [Q_MAX-1:0]       v_sym;
  logic                   v_pass, v_exh;

  // Horizontal steps.
  logic                   h_init, h_consume;
  logic [MT_MAX-1:0]      h_valid, h_pass, h_exh;
  logic [Q_MAX-1:0]       h_sym  [MT_MAX];
  logic [Q_MAX-1:0]       h_bits [MT_MAX];
  logic [W_M-1:0]         h_mp   [MT_MAX];
  logic [W_M-1:0]         h_lb   [MT_MAX];

  // Decision.
  typedef enum logic [2:0] {A_NONE, A_GO_V, A_OPEN_V, A_GO_H, A_PRUNE_H, A_DONE} act_t;
  act_t                   action;
  logic [2:0]             sel;          // level of the chosen sibling
  logic                   upd;
  logic [Q_MAX-1:0]       leaf_bits [MT_MAX];
  logic [W_M-1:0]         leaf_m;
  logic                   map_valid;
  logic [Q_MAX-1:0]       x_map [MT_MAX];
  logic signed [W_L-1:0]  le [MT_MAX][Q_MAX];

  function automatic logic [Q_MAX-1:0] bits_of(logic [Q_MAX-1:0] s, logic [3:0] qq);
    return Q_MAX'(sym_bits(int'(s[QH-1:0]), int'(s[Q_MAX-1:QH]), int'(qq) / 2));
  endfunction

  assign in_ready = (state == S_IDLE) && (!out_valid || out_ready);
  assign accept   = in_valid && in_ready;

  always_comb begin
    la_src = accept ? in_la : la;
    for (int j = 0; j < MT_MAX; j++) path_bits[j] = bits_of(path_sym[j], q);
    pm_cur = (cur == mt) ? '0 : path_pm[cur[LV-1:0]];
    k      = cur - 3'd1;
    v_req  = (state == S_SEARCH) && vpend && (cur != 3'd0);
  end

  sd_ma_storage #(.MT_MAX(MT_MAX), .Q_MAX(Q_MAX), .W_L(W_L), .W_M(W_M)) u_ma (
    .clk, .rst_n, .start(accept), .mt(in_mt), .q(in_q), .la(la_src), .ma,
    .row_ok(ma_ok));

  sd_vstep #(.MT_MAX(MT_MAX), .Q_MAX(Q_MAX), .W_Y(W_Y), .W_B(W_B), .W_L(W_L), .W_M(W_M),
             .MC_SHIFT(MC_SHIFT)) u_vstep (
    .k, .mt, .q, .y_re, .y_im, .r_re, .r_im, .path_sym, .la, .ma_row(ma[k[LV-1:0]]),
    .pm_parent(pm_cur), .b_re(v_b_re), .b_im(v_b_im), .rii(v_rii), .c_re(v_c_re),
    .c_im(v_c_im), .up_re(v_up_re), .up_im(v_up_im), .mc_slice(v_mc_slice), .v_sym, .v_mp,
    .v_lb, .v_from_c);

  sd_hstep #(.MT_MAX(MT_MAX), .Q_MAX(Q_MAX), .W_Y(W_Y), .W_B(W_B), .W_M(W_M),
             .MC_SHIFT(MC_SHIFT)) u_hstep (
    .clk, .rst_n, .init(h_init), .init_lvl(k[LV-1:0]), .consume(h_consume), .cons_lvl(sel[LV-1:0]), .q,
    .i_b_re(v_b_re), .i_b_im(v_b_im), .i_rii(v_rii), .i_c_re(v_c_re), .i_c_im(v_c_im),
    .i_up_re(v_up_re), .i_up_im(v_up_im), .i_mc_slice(v_mc_slice), .i_pm_parent(pm_cur),
    .i_v_sym(v_sym), .i_v_from_c(v_from_c), .ma,
    .cand_valid(h_valid), .cand_sym(h_sym), .cand_mp(h_mp), .lb(h_lb));

  always_comb for (int l = 0; l < MT_MAX; l++) h_bits[l] = bits_of(h_sym[l], q);

  sd_prune #(.MT_MAX(MT_MAX), .Q_MAX(Q_MAX), .W_M(W_M), .W_L(W_L)) u_prune (
    .clk, .rst_n, .clear(accept), .mt, .q, .clip, .path_bits,
    .v_lvl(k), .v_bits(bits_of(v_sym, q)), .v_mp, .v_lb, .v_pass, .v_exh,
    .h_bits, .h_mp, .h_lb, .h_pass, .h_exh,
    .upd, .leaf_bits, .leaf_m, .la, .map_valid, .x_map, .le);

  // Next-node selection.
  always_comb begin
    logic found;
    action    = A_NONE;
    sel       = '0;
    found     = 1'b0;
    h_init    = '0;
    h_consume = '0;
    upd       = 1'b0;
    leaf_m    = '0;
    for (int j = 0; j < MT_MAX; j++) leaf_bits[j] = path_bits[j];
    if (state == S_SEARCH) begin
      if (max_cyc != '0 && cyc >= max_cyc && map_valid) begin
        action = A_DONE;
      end else if (v_req && v_pass) begin
        action = A_GO_V;
      end else if (v_req && !v_exh) begin
        action = A_OPEN_V;
      end else begin
        for (int l = 0; l < MT_MAX; l++) begin
          if (!found && act[l] && h_valid[l] && !h_exh[l]) begin
            found = 1'b1;
            sel   = 3'(l);
          end
        end
        if (!found)                   action = A_DONE;
        else if (h_pass[sel[LV-1:0]]) action = A_GO_H;
        else                          action = A_PRUNE_H;
      end
    end
    case (action)
      A_GO_V, A_OPEN_V: h_init = 1'b1;
      A_GO_H, A_PRUNE_H: h_consume = 1'b1;
      default: ;
    endcase
    if (action == A_GO_V && k == 3'd0) begin
      upd          = 1'b1;
      leaf_bits[0] = bits_of(v_sym, q);
      leaf_m       = v_mp;
    end
    if (action == A_GO_H && sel == 3'd0) begin
      upd          = 1'b1;
      leaf_bits[0] = h_bits[0];
      leaf_m       = h_mp[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mt        <= 3'(MT_MAX);
      q         <= 4'(Q_MAX);
      clip      <= '0;
      max_cyc   <= '0;
      cur       <= '0;
      vpend     <= 1'b0;
      act       <= '0;
      cyc       <= '0;
      out_valid <= 1'b0;
      out_cycles <= '0;
      for (int j = 0; j < MT_MAX; j++) begin
        y_re[j] <= '0; y_im[j] <= '0;
        path_sym[j] <= '0; path_pm[j] <= '0; out_xmap[j] <= '0;
        for (int i = 0; i < MT_MAX; i++) begin r_re[j][i] <= '0; r_im[j][i] <= '0; end
        for (int b = 0; b < Q_MAX; b++) begin la[j][b] <= '0; out_le[j][b] <= '0; end
      end
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (accept) begin
        state   <= S_SEARCH;
        mt      <= in_mt;
        q       <= in_q;
        clip    <= in_clip;
        max_cyc <= in_max_cyc;
        y_re    <= in_y_re;  y_im <= in_y_im;
        r_re    <= in_r_re;  r_im <= in_r_im;
        la      <= in_la;
        cur     <= in_mt;
        vpend   <= 1'b1;
        act     <= '0;
        cyc     <= W_CYC'(1);
      end else if (state == S_SEARCH) begin
        if (cyc != '1) cyc <= cyc + 1'b1;
        case (action)
          A_GO_V: begin
            path_sym[k[LV-1:0]] <= v_sym;
            path_pm[k[LV-1:0]]  <= v_mp;
            cur                 <= k;
            vpend               <= (k != 3'd0);
            act[k[LV-1:0]]      <= 1'b1;
          end
          A_OPEN_V: begin
            vpend          <= 1'b0;
            act[k[LV-1:0]] <= 1'b1;
          end
          A_GO_H: begin
            path_sym[sel[LV-1:0]] <= h_sym[sel[LV-1:0]];
            path_pm[sel[LV-1:0]]  <= h_mp[sel[LV-1:0]];
            cur                   <= sel;
            vpend                 <= (sel != 3'd0);
            for (int j = 0; j < MT_MAX; j++) if (j < int'(sel)) act[j] <= 1'b0;
          end
          A_PRUNE_H: begin
            cur   <= sel + 3'd1;
            vpend <= 1'b0;
            for (int j = 0; j < MT_MAX; j++) if (j < int'(sel)) act[j] <= 1'b0;
          end
          A_DONE: begin
            state      <= S_IDLE;
            out_valid  <= 1'b1;
            out_le     <= le;
            out_xmap   <= x_map;
            out_cycles <= (cyc == '1) ? cyc : cyc + 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // The a-priori metric row of a level is written before the search can first reach it.
  a_ma_ready: assert property (@(posedge clk) disable iff (!rst_n) v_req |-> ma_ok[k[LV-1:0]])
    else $error("M_A row of level %0d used before it was written", k);
endmodule
