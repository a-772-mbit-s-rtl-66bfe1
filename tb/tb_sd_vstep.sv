// Testbench of the vertical-step unit: random channels, paths and priors on random target
// levels. Independently of the unit, the test cancels the interference of the path, evaluates
// M_C and M_A of every symbol of the level, and checks that the M_C-best child is a true
// M_C minimiser, the M_A-best child has M_A = 0, the offered child has the smaller M_P of
// the two, and the lower bound equals M_P(parent) + min M_C.
module tb_sd_vstep;
  import sd_ref_pkg::*;
  localparam int MT_MAX = 4, Q_MAX = 6;
  logic [2:0] k, mt;
  logic [3:0] q;
  logic signed [11:0] y_re [MT_MAX], y_im [MT_MAX], r_re [MT_MAX][MT_MAX], r_im [MT_MAX][MT_MAX];
  logic [Q_MAX-1:0] path_sym [MT_MAX];
  logic signed [7:0] la [MT_MAX][Q_MAX];
  logic [19:0] ma_row [64];
  logic [19:0] pm_parent;
  logic signed [19:0] b_re, b_im;
  logic signed [11:0] rii;
  logic [2:0] c_re, c_im;
  logic up_re, up_im, v_from_c;
  logic [19:0] mc_slice, v_mp, v_lb;
  logic [Q_MAX-1:0] v_sym;
  int checks = 0, failures = 0;

  sd_vstep dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t v;
    for (int n = 0; n < 600; n++) begin
      int m, qq, qh, p, kk, s_re, s_im, bits, mamin_sym;
      longint br, bi, mcmin, mc_s, mc_v, exp_mp, ma_c, ma_a, mp_c, mp_a, mp0;
      m = 1 + n % 4; qq = 2 * (1 + (n / 4) % 3); qh = qq / 2; p = 1 << qh;
      kk = int'($urandom_range(m - 1, 0));
      v = random_vec(m, qq, 40, 30, 0, (qq == 6) ? 30 : 60, (qq == 6) ? 10 : 20);
      k = 3'(kk); mt = 3'(m); q = 4'(qq);
      for (int j = 0; j < MT_MAX; j++) begin
        y_re[j] = 12'(v.y_re[j]); y_im[j] = 12'(v.y_im[j]);
        for (int i = 0; i < MT_MAX; i++) begin r_re[j][i] = 12'(v.r_re[j][i]); r_im[j][i] = 12'(v.r_im[j][i]); end
        for (int b = 0; b < Q_MAX; b++) la[j][b] = 8'(v.la[j][b]);
        path_sym[j] = 6'({3'($urandom_range(p - 1, 0)), 3'($urandom_range(p - 1, 0))});
      end
      for (int s = 0; s < 64; s++) begin
        int re, im;
        re = s % 8; im = s / 8;
        bits = gray1(re) | (gray1(im) << qh);
        ma_row[s] = 20'hfffff;
        if (re < p && im < p) begin
          int acc;
          acc = 0;
          for (int b = 0; b < qq; b++)
            if ((((bits >> b) & 1) == 1) != (v.la[kk][b] > 0)) acc += (v.la[kk][b] < 0) ? -v.la[kk][b] : v.la[kk][b];
          ma_row[s] = 20'(acc);
        end
      end
      mp0 = longint'($urandom_range(5000, 0));
      pm_parent = 20'(mp0);
      #1;
      br = v.y_re[kk]; bi = v.y_im[kk];
      for (int i = kk + 1; i < m; i++) begin
        s_re = 2 * int'(path_sym[i][2:0]) - (p - 1); s_im = 2 * int'(path_sym[i][5:3]) - (p - 1);
        br = br - v.r_re[kk][i] * s_re + v.r_im[kk][i] * s_im;
        bi = bi - v.r_re[kk][i] * s_im - v.r_im[kk][i] * s_re;
      end
      checks++;
      if (longint'(b_re) != br || longint'(b_im) != bi) begin failures++; $display("FAIL b"); end
      mcmin = 64'h7fffffff;
      for (int re = 0; re < p; re++)
        for (int im = 0; im < p; im++) begin
          longint t;
          t = mc_ref(br, bi, v.r_re[kk][kk], re, im, p, 6, 20);
          if (t < mcmin) mcmin = t;
        end
      mc_s = mc_ref(br, bi, v.r_re[kk][kk], int'(c_re), int'(c_im), p, 6, 20);
      checks++;
      if (int'(c_re) >= p || int'(c_im) >= p || mc_s != mcmin || longint'(mc_slice) != mcmin) begin
        failures++; $display("FAIL slice (%0d,%0d) mc=%0d min=%0d", c_re, c_im, mc_s, mcmin);
      end
      // M_A-best: the symbol with M_A = 0
      mamin_sym = -1;
      for (int s = 0; s < 64; s++) if (ma_row[s] == 0) mamin_sym = s;
      mp_c = mp0 + mcmin + longint'(ma_row[{c_im, c_re}]);
      mp_a = mp0 + mc_ref(br, bi, v.r_re[kk][kk], mamin_sym % 8, mamin_sym / 8, p, 6, 20);
      exp_mp = (mp_c <= mp_a) ? mp_c : mp_a;
      mc_v = mc_ref(br, bi, v.r_re[kk][kk], int'(v_sym[2:0]), int'(v_sym[5:3]), p, 6, 20);
      checks++;
      if (longint'(v_mp) != exp_mp || mp0 + mc_v + longint'(ma_row[v_sym]) != exp_mp) begin
        failures++; $display("FAIL child mp=%0d exp=%0d", v_mp, exp_mp);
      end
      checks++;
      if (longint'(v_lb) != mp0 + mcmin) begin failures++; $display("FAIL lb"); end
      checks++;
      if (v_from_c != (v_sym == {c_im, c_re}) && mp_c != mp_a) begin failures++; $display("FAIL from_c"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
