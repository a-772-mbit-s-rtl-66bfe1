// Testbench of the pruning-criteria checks unit. A random sequence of leaves is fed to the
// leaf-update port while the test keeps its own copy of the map metric, map bits and
// counter-hypothesis metrics. After every step the extrinsic LLRs, the map bits and all
// concurrent node and level tests (child and one sibling per level, random bits, metrics and
// path) are compared with the pruning rule evaluated bit by bit, without the unit's shared
// reference metrics.
module tb_sd_prune;
  localparam int MT_MAX = 4, Q_MAX = 6;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, upd = 1'b0;
  logic [2:0] mt;
  logic [3:0] q;
  logic [19:0] clip;
  logic [Q_MAX-1:0] path_bits [MT_MAX], h_bits [MT_MAX], leaf_bits [MT_MAX], x_map [MT_MAX];
  logic [2:0] v_lvl;
  logic [Q_MAX-1:0] v_bits;
  logic [19:0] v_mp, v_lb, leaf_m;
  logic v_pass, v_exh, map_valid;
  logic [19:0] h_mp [MT_MAX], h_lb [MT_MAX];
  logic [MT_MAX-1:0] h_pass, h_exh;
  logic signed [7:0] la [MT_MAX][Q_MAX], le [MT_MAX][Q_MAX];
  int checks = 0, failures = 0, n_pass = 0, n_prune = 0, n_exh = 0;

  sd_prune dut (.*);
  always #5 clk = ~clk;

  longint lmap, lbar [MT_MAX][Q_MAX];
  int xm [MT_MAX];
  bit mv;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint leff(int j, int b);
    longint lim;
    lim = lmap + longint'(clip);
    return (lbar[j][b] < lim) ? lbar[j][b] : lim;
  endfunction

  function automatic bit keep_node(int l, int bits, longint m);
    if (!mv) return 1'b1;
    for (int j = 0; j < int'(mt); j++)
      for (int b = 0; b < int'(q); b++) begin
        bit rel;
        rel = (j < l) || (j == l && (((bits ^ xm[j]) >> b) & 1)) ||
              (j > l && (((int'(path_bits[j]) ^ xm[j]) >> b) & 1));
        if (rel && m < leff(j, b)) return 1'b1;
      end
    return 1'b0;
  endfunction

  function automatic bit keep_level(int l, longint m);
    if (!mv) return 1'b1;
    for (int j = 0; j < int'(mt); j++)
      for (int b = 0; b < int'(q); b++) begin
        bit rel;
        rel = (j <= l) || (((int'(path_bits[j]) ^ xm[j]) >> b) & 1);
        if (rel && m < leff(j, b)) return 1'b1;
      end
    return 1'b0;
  endfunction

  task automatic check_all();
    bit e;
    // random concurrent checks
    for (int j = 0; j < MT_MAX; j++) begin
      path_bits[j] = 6'($urandom);
      h_bits[j] = 6'($urandom) & 6'((1 << int'(q)) - 1);
      h_mp[j] = 20'(lmap < 100000 ? lmap + $urandom_range(80, 0) - 20 : $urandom_range(400, 0));
      h_lb[j] = 20'(lmap < 100000 ? lmap + $urandom_range(80, 0) - 20 : $urandom_range(400, 0));
      if (lmap < 100000 && lmap < 20) begin h_mp[j] = 20'(lmap + $urandom_range(60, 0)); h_lb[j] = h_mp[j]; end
    end
    v_lvl = 3'($urandom_range(int'(mt) - 1, 0));
    v_bits = 6'($urandom) & 6'((1 << int'(q)) - 1);
    v_mp = h_mp[0] + 20'($urandom_range(10, 0));
    v_lb = v_mp;
    #1;
    checks++;
    if (v_pass != keep_node(int'(v_lvl), int'(v_bits), longint'(v_mp)) ||
        v_exh != !keep_level(int'(v_lvl), longint'(v_lb))) begin
      failures++; $display("FAIL vertical check");
    end
    for (int l = 0; l < int'(mt); l++) begin
      checks++;
      if (h_pass[l] != keep_node(l, int'(h_bits[l]), longint'(h_mp[l])) ||
          h_exh[l] != !keep_level(l, longint'(h_lb[l]))) begin
        failures++; $display("FAIL horizontal check level %0d", l);
      end
      if (h_pass[l]) n_pass++; else n_prune++;
      if (h_exh[l]) n_exh++;
    end
    // LLRs and map bits
    e = 1'b0;
    for (int j = 0; j < MT_MAX; j++)
      for (int b = 0; b < Q_MAX; b++) begin
        longint d;
        int x;
        if (!mv || j >= int'(mt) || b >= int'(q)) x = 0;
        else begin
          d = leff(j, b) - lmap;
          if (((xm[j] >> b) & 1) == 0) d = -d;
          d = d - longint'(la[j][b]);
          if (d > 127) d = 127;
          if (d < -127) d = -127;
          x = int'(d);
        end
        if (int'(le[j][b]) != x) e = 1'b1;
      end
    if (mv) for (int j = 0; j < int'(mt); j++) if (int'(x_map[j]) != xm[j]) e = 1'b1;
    checks++;
    if (e) begin failures++; $display("FAIL LLRs or map bits"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      mt = 3'(1 + n % 4); q = 4'(2 * (1 + (n / 4) % 3));
      clip = (n % 3 == 0) ? 20'd100000 : 20'($urandom_range(50, 1));
      for (int j = 0; j < MT_MAX; j++) for (int b = 0; b < Q_MAX; b++) la[j][b] = 8'($urandom_range(60, 0) - 30);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      mv = 1'b0; lmap = 20'hfffff;
      for (int j = 0; j < MT_MAX; j++) begin xm[j] = 0; for (int b = 0; b < Q_MAX; b++) lbar[j][b] = 20'hfffff; end
      for (int s = 0; s < 30; s++) begin
        int lb_bits [MT_MAX];
        longint m;
        check_all();
        m = mv ? lmap + $urandom_range(60, 0) - 25 : $urandom_range(300, 50);
        if (m < 0) m = 0;
        for (int j = 0; j < MT_MAX; j++) begin
          lb_bits[j] = int'($urandom) & ((1 << int'(q)) - 1);
          if (j >= int'(mt)) lb_bits[j] = 0;
          leaf_bits[j] = 6'(lb_bits[j]);
        end
        leaf_m = 20'(m);
        upd = 1'b1;
        @(negedge clk);
        upd = 1'b0;
        // reference update
        if (!mv || m < lmap) begin
          if (mv)
            for (int j = 0; j < MT_MAX; j++) for (int b = 0; b < Q_MAX; b++)
              if (((lb_bits[j] ^ xm[j]) >> b) & 1) lbar[j][b] = lmap;
          lmap = m; mv = 1'b1;
          for (int j = 0; j < MT_MAX; j++) xm[j] = lb_bits[j];
        end else begin
          for (int j = 0; j < MT_MAX; j++) for (int b = 0; b < Q_MAX; b++)
            if ((((lb_bits[j] ^ xm[j]) >> b) & 1) && m < lbar[j][b]) lbar[j][b] = m;
        end
      end
      check_all();
    end
    checks++;
    if (n_pass == 0 || n_prune == 0 || n_exh == 0) begin failures++; $display("FAIL coverage %0d %0d %0d", n_pass, n_prune, n_exh); end
    $display("kept=%0d pruned=%0d levels closed=%0d", n_pass, n_prune, n_exh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
