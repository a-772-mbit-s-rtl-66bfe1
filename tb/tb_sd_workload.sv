// Workload testbench: 4x4 64-QAM, the mode with the highest search effort, on the 64-QAM core
// at default parameters. Three noise levels (high, medium and low SNR) are each run without
// clipping, with a small LLR clipping level and with a cycle limit. The average cycles per
// vector and the resulting throughput at a 193 MHz clock are printed. An exhaustive reference
// is out of reach here (64^4 leaves), so every result is checked for properties that must hold:
//   * the stored map metric equals the metric of the returned map bits, recomputed here, and is
//     not above the metric of the transmitted vector unless the cycle limit cut the search short;
//   * each detection LLR L^E + L^A has the sign of the map bit, and its magnitude is within the
//     clipping level;
//   * without clipping or limit, the magnitude of a bit in which the transmitted vector differs
//     from the map is at most the metric gap between the two vectors;
//   * at least M_T + 2 = 6 cycles, at most the cycle limit + 1;
//   * on average, clipping does not increase the effort.
module tb_sd_workload;
  import sd_ref_pkg::*;
  localparam int MT_MAX = 4, Q_MAX = 6, W_Y = 12, W_L = 8, W_M = 20, SH = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  logic [2:0] in_mt = 3'd4;
  logic [3:0] in_q = 4'd6;
  logic [W_M-1:0] in_clip = '0;
  logic [15:0] in_max_cyc = '0;
  logic signed [W_Y-1:0] in_y_re [MT_MAX], in_y_im [MT_MAX];
  logic signed [W_Y-1:0] in_r_re [MT_MAX][MT_MAX], in_r_im [MT_MAX][MT_MAX];
  logic signed [W_L-1:0] in_la [MT_MAX][Q_MAX];
  logic signed [W_L-1:0] out_le [MT_MAX][Q_MAX];
  logic [Q_MAX-1:0] out_xmap [MT_MAX];
  logic [15:0] out_cycles;
  int checks = 0, failures = 0;

  sd_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one vector; returns the cycles used.
  task automatic run(vec_t v, int max_cyc, int tx_re[4], int tx_im[4], output int cyc);
    int re[4], im[4];
    longint m_map, m_tx, lam;
    bit bad;
    in_mt = 3'(v.mt); in_q = 4'(v.q); in_clip = W_M'(v.clip); in_max_cyc = 16'(max_cyc);
    for (int j = 0; j < MT_MAX; j++) begin
      in_y_re[j] = W_Y'(v.y_re[j]); in_y_im[j] = W_Y'(v.y_im[j]);
      for (int i = 0; i < MT_MAX; i++) begin
        in_r_re[j][i] = W_Y'(v.r_re[j][i]); in_r_im[j][i] = W_Y'(v.r_im[j][i]);
      end
      for (int b = 0; b < Q_MAX; b++) in_la[j][b] = W_L'(v.la[j][b]);
    end
    in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
    while (!out_valid) @(posedge clk);
    #1;
    cyc = int'(out_cycles);
    lam = longint'(dut.u_prune.lam_map);
    for (int j = 0; j < 4; j++) begin
      re[j] = gray_dec(int'(out_xmap[j]) & 7);
      im[j] = gray_dec(int'(out_xmap[j]) >> 3);
    end
    m_map = leaf_metric(v, re, im, SH, W_M);
    m_tx  = leaf_metric(v, tx_re, tx_im, SH, W_M);
    checks++;
    if (m_map != lam || (max_cyc == 0 && m_map > m_tx)) begin
      failures++; $display("FAIL map metric %0d stored %0d transmitted %0d", m_map, lam, m_tx);
    end
    bad = 1'b0;
    for (int j = 0; j < 4; j++)
      for (int b = 0; b < 6; b++) begin
        int ld, txb;
        ld = int'(out_le[j][b]) + v.la[j][b];
        if (out_le[j][b] != 8'sd127 && out_le[j][b] != -8'sd127) begin
          if (((out_xmap[j] >> b) & 1) ? ld < 0 : ld > 0) bad = 1'b1;
          if (ld > v.clip || ld < -v.clip) bad = 1'b1;
          txb = ((gray1(tx_re[j]) | (gray1(tx_im[j]) << 3)) >> b) & 1;
          if (max_cyc == 0 && v.clip >= 100000 && txb != ((out_xmap[j] >> b) & 1) &&
              longint'(ld < 0 ? -ld : ld) > m_tx - m_map) bad = 1'b1;
        end
      end
    checks++;
    if (bad) begin failures++; $display("FAIL LLR properties"); end
    checks++;
    if (cyc < 6 || (max_cyc != 0 && cyc > max_cyc + 1)) begin failures++; $display("FAIL cycles %0d", cyc); end
  endtask

  initial begin
    int noise[3] = '{8, 30, 70};
    int nvec = 6;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int s = 0; s < 3; s++) begin
      longint tot[3];
      tot = '{0, 0, 0};
      for (int n = 0; n < nvec; n++) begin
        vec_t v;
        int tx_re[4], tx_im[4], cyc;
        v = random_vec(4, 6, 0, 24, 100000, 30, 10);
        // recover the transmitted indices from the noise-free receive vector by back-substitution
        for (int j = 3; j >= 0; j--) begin
          int ar, ai;
          ar = v.y_re[j]; ai = v.y_im[j];
          for (int i = j + 1; i < 4; i++) begin
            ar -= v.r_re[j][i] * (2 * tx_re[i] - 7) - v.r_im[j][i] * (2 * tx_im[i] - 7);
            ai -= v.r_re[j][i] * (2 * tx_im[i] - 7) + v.r_im[j][i] * (2 * tx_re[i] - 7);
          end
          tx_re[j] = (ar / v.r_re[j][j] + 7) / 2;
          tx_im[j] = (ai / v.r_re[j][j] + 7) / 2;
        end
        for (int j = 0; j < 4; j++) begin
          v.y_re[j] += int'($urandom_range(2 * noise[s], 0)) - noise[s];
          v.y_im[j] += int'($urandom_range(2 * noise[s], 0)) - noise[s];
        end
        v.clip = 100000;
        run(v, 0, tx_re, tx_im, cyc);      tot[0] += cyc;
        v.clip = 6;
        run(v, 0, tx_re, tx_im, cyc);      tot[1] += cyc;
        v.clip = 100000;
        run(v, 40, tx_re, tx_im, cyc);     tot[2] += cyc;
      end
      for (int c = 0; c < 3; c++)
        $display("noise %0d, %s: %0d cycles/vector on average, %0d Mbit/s at 193 MHz", noise[s],
                 c == 0 ? "no clipping" : (c == 1 ? "clip 6     " : "limit 40   "),
                 tot[c] / nvec, 24 * 193 * nvec / tot[c]);
      checks++;
      if (tot[1] > tot[0]) begin failures++; $display("FAIL clipping raised the effort"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
