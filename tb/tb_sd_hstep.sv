// Testbench of the horizontal-step unit (four levels, one shared datapath). Each trial picks a
// level, loads it with a random receive value, diagonal entry and M_A row (first child taken
// from either list), then consumes offered siblings, with random idle cycles in between so that
// candidates are offered both straight from the shared datapath and from the per-level store.
// Half of the trials run the level dry, the others stop early and leave it open, so that the
// other levels hold live candidates; those must not change while another level is enumerated.
// Checked against quantities the test computes itself: every existing symbol except the first
// child is offered exactly once, every offered metric equals M_P(parent) + M_C + M_A of the
// offered symbol, and the lower bound never exceeds the metric of any sibling not yet offered.
// It also counts how often the M_C list had to skip a symbol already taken through the M_A list.
module tb_sd_hstep;
  import sd_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, consume = 1'b0;
  logic [3:0] q;
  logic signed [19:0] i_b_re, i_b_im;
  logic signed [11:0] i_rii;
  logic [2:0] i_c_re, i_c_im;
  logic i_up_re, i_up_im, i_v_from_c;
  logic [19:0] i_mc_slice, i_pm_parent;
  logic [5:0] i_v_sym;
  logic [1:0] init_lvl, cons_lvl;
  logic [19:0] ma [4][64];
  logic [3:0] cand_valid;
  logic [5:0] cand_sym [4];
  logic [19:0] cand_mp [4], lb [4];
  logic [19:0] ma_row [64];
  int lv;
  int checks = 0, failures = 0, n_skip = 0, n_from_a = 0, n_stored = 0, n_live = 0;
  logic [19:0] mrow_keep [4][64];

  sd_hstep dut (.*);
  always_comb begin
    for (int l = 0; l < 4; l++) for (int s = 0; s < 64; s++) ma[l][s] = (l == lv) ? ma_row[s] : mrow_keep[l][s];
  end
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int qq, qh, p, cr, ci, offered, nvalid, stop_at;
      logic [3:0] o_valid;
      logic [5:0] o_sym [4];
      logic [19:0] o_mp [4];
      longint br, bi, rr, pm, mc[64], mp[64], best;
      bit seen[64];
      for (int s = 0; s < 64; s++) mrow_keep[lv][s] = ma_row[s];
      qq = 2 * (1 + (n / 60) % 3); qh = qq / 2; p = 1 << qh;
      rr = 10 + $urandom_range(60, 0);
      br = longint'($urandom_range(2 * p * 70, 0)) - p * 70;
      bi = longint'($urandom_range(2 * p * 70, 0)) - p * 70;
      pm = $urandom_range(1000, 0);
      // slice point and zig-zag sides, worked out by brute force
      best = 64'h7fffffffffff; cr = 0; ci = 0;
      for (int s = 0; s < 64; s++) begin
        seen[s] = 1'b0; mc[s] = 0; mp[s] = 0;
        if (s % 8 < p && s / 8 < p) begin
          mc[s] = mc_ref(br, bi, rr, s % 8, s / 8, p, 6, 20);
          ma_row[s] = 20'($urandom_range(n % 2 ? 8 : 200, 0));
          if (mc[s] < best) begin best = mc[s]; cr = s % 8; ci = s / 8; end
        end else ma_row[s] = 20'hfffff;
      end
      // ensure the chosen slice point is the nearest point per axis
      for (int s = 0; s < 64; s++) mp[s] = pm + mc[s] + longint'(ma_row[s]);
      @(negedge clk);
      o_valid = cand_valid; o_sym = cand_sym; o_mp = cand_mp;
      lv = $urandom_range(3, 0);
      if (n < 4) q = 4'(qq);
      else if (int'(q) != qq) begin
        // the modulation order is common to all levels: re-run the other levels from scratch
        rst_n = 1'b0; @(negedge clk); rst_n = 1'b1; o_valid = '0;
      end
      q = 4'(qq);
      init_lvl = 2'(lv); cons_lvl = 2'(lv);
      i_b_re = 20'(br); i_b_im = 20'(bi); i_rii = 12'(rr);
      i_c_re = 3'(cr); i_c_im = 3'(ci);
      i_up_re = br >= rr * (2 * cr - (p - 1));
      i_up_im = bi >= rr * (2 * ci - (p - 1));
      i_mc_slice = 20'(best); i_pm_parent = 20'(pm);
      i_v_from_c = n % 4 != 1;
      i_v_sym = i_v_from_c ? 6'(ci * 8 + cr) : 6'($urandom_range(p - 1, 0) * 8 + $urandom_range(p - 1, 0));
      if (!i_v_from_c && i_v_sym == 6'(ci * 8 + cr)) i_v_from_c = 1'b1;
      seen[i_v_sym] = 1'b1;
      init = 1'b1;
      @(negedge clk);
      init = 1'b0;
      offered = 0; nvalid = p * p - 1;
      stop_at = (n % 2) ? 64 : $urandom_range(nvalid - 1, 0);
      while (cand_valid[lv] && offered <= 64 && offered < stop_at) begin
        longint minrest;
        minrest = 64'h7fffffffffff;
        for (int s = 0; s < 64; s++) if (s % 8 < p && s / 8 < p && !seen[s] && mp[s] < minrest) minrest = mp[s];
        checks++;
        if (seen[cand_sym[lv]] || int'(cand_sym[lv]) % 8 >= p || int'(cand_sym[lv]) / 8 >= p) begin
          failures++; $display("FAIL offered %0d twice or invalid", cand_sym[lv]);
        end
        checks++;
        if (longint'(cand_mp[lv]) != mp[cand_sym[lv]]) begin failures++; $display("FAIL mp %0d exp %0d", cand_mp[lv], mp[cand_sym[lv]]); end
        checks++;
        if (longint'(lb[lv]) > minrest) begin failures++; $display("FAIL lb %0d > %0d", lb[lv], minrest); end
        if (dut.dirty) begin
          if (dut.cc_valid && dut.cc_stale) n_skip++;
          if (!dut.use_c) n_from_a++;
        end else n_stored++;
        seen[cand_sym[lv]] = 1'b1;
        offered++;
        consume = 1'b1;
        @(negedge clk);
        consume = 1'b0;
        if ($urandom_range(3, 0) == 0) repeat ($urandom_range(2, 1)) @(negedge clk);
      end
      for (int l = 0; l < 4; l++) if (l != lv) begin
        checks++;
        if (o_valid[l]) n_live++;
        if (cand_valid[l] != o_valid[l] || (o_valid[l] && (cand_sym[l] != o_sym[l] || cand_mp[l] != o_mp[l]))) begin
          failures++; $display("FAIL level %0d candidate changed while level %0d was enumerated", l, lv);
        end
      end
      checks++;
      if (offered != nvalid && offered != stop_at) begin failures++; $display("FAIL offered %0d of %0d", offered, nvalid); end
    end
    checks++;
    if (n_skip == 0 || n_from_a == 0 || n_stored == 0 || n_live == 0) begin
      failures++; $display("FAIL skip=%0d from_a=%0d stored=%0d", n_skip, n_from_a, n_stored);
    end
    $display("skips=%0d M_A-list picks=%0d offers from the store=%0d live other levels=%0d", n_skip, n_from_a, n_stored, n_live);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
