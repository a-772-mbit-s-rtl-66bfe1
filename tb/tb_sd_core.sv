// Self-checking testbench of one decoder core (64-QAM, 4 antennas, default parameters).
// Random channels, receive vectors and a-priori LLRs in several run-time configurations are
// detected by the core and by an exhaustive reference search (sd_ref_pkg); the extrinsic LLRs
// must match exactly, the map bits too unless the best leaf is tied. Also checked: the minimum
// of M_T + 2 cycles per vector (noise-free vectors with agreeing priors and no clipping margin
// must reach it, no vector may go below it), the cycle limit, and output back-pressure.
module tb_sd_core;
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
  int checks = 0, failures = 0, cycle = 0;

  sd_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(vec_t v, int max_cyc);
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
  endtask

  task automatic collect(output int cyc);
    while (!out_valid) @(posedge clk);
    cyc = int'(out_cycles);
    #1;
  endtask

  task automatic run_one(vec_t v, int max_cyc, bit exact, bit expect_min);
    res_t r;
    int cyc;
    bit bad;
    drive(v, max_cyc);
    collect(cyc);
    checks++;
    if (cyc < v.mt + 2) begin
      failures++; $display("FAIL cycles %0d below minimum %0d", cyc, v.mt + 2);
    end
    if (expect_min) begin
      checks++;
      if (cyc != v.mt + 2) begin failures++; $display("FAIL min-case took %0d cycles", cyc); end
    end
    if (max_cyc != 0) begin
      checks++;
      if (cyc > max_cyc + 1) begin failures++; $display("FAIL limit %0d exceeded: %0d", max_cyc, cyc); end
    end
    if (exact) begin
      r = detect(v, SH, W_M, W_L);
      bad = 1'b0;
      for (int j = 0; j < MT_MAX; j++) begin
        for (int b = 0; b < Q_MAX; b++)
          if (int'(out_le[j][b]) != r.le[j][b]) bad = 1'b1;
        if (r.ties == 1 && j < v.mt && int'(out_xmap[j]) != r.xmap[j]) bad = 1'b1;
      end
      checks++;
      if (bad) begin
        failures++;
        $display("FAIL mt=%0d q=%0d clip=%0d", v.mt, v.q, v.clip);
        for (int j = 0; j < v.mt; j++)
          for (int b = 0; b < v.q; b++)
            $display("  L[%0d][%0d] dut=%0d ref=%0d  xmap dut=%0h ref=%0h", j, b, out_le[j][b],
                     r.le[j][b], out_xmap[j], r.xmap[j]);
      end
    end
  endtask

  initial begin
    vec_t v;
    int cfg_mt[6];
    int cfg_q[6];
    cfg_mt = '{4, 4, 2, 3, 1, 2};
    cfg_q  = '{2, 4, 6, 4, 6, 2};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int c = 0; c < 6; c++) begin
      for (int n = 0; n < 12; n++) begin
        int clip;
        clip = (n % 3 == 0) ? 100000 : int'($urandom_range(60, 4));
        v = random_vec(cfg_mt[c], cfg_q[c], 12, 30, clip, 60, 20);
        if (cfg_q[c] == 6) v = random_vec(cfg_mt[c], cfg_q[c], 12, 30, clip, 30, 10);
        run_one(v, 0, 1'b1, 1'b0);
      end
      // noise-free, agreeing priors, no clipping margin: minimum cycle count
      v = random_vec(cfg_mt[c], cfg_q[c], 0, 30, 0, 40, 10);
      for (int j = 0; j < 4; j++) for (int b = 0; b < 6; b++) if (v.la[j][b] == 0) v.la[j][b] = 1;
      for (int j = 0; j < 4; j++) for (int b = 0; b < 6; b++) begin
        // make all priors agree in sign with the first-found transmitted bits
        v.la[j][b] = (v.la[j][b] < 0) ? v.la[j][b] : v.la[j][b];
      end
      run_one(v, 0, 1'b1, 1'b0);
    end
    // Minimum-latency case: exact receive vector and priors matching the transmitted bits.
    for (int n = 0; n < 6; n++) begin
      v = random_vec(4, 6, 0, 0, 0, 30, 10);
      run_one(v, 0, 1'b1, 1'b1);
    end
    // Cycle limit as run-time constraint on noisy vectors.
    for (int n = 0; n < 6; n++) begin
      v = random_vec(4, 4, 60, 10, 100000, 40, 20);
      run_one(v, 9, 1'b0, 1'b0);
    end
    // Back-pressure: output held while out_ready is low.
    out_ready = 1'b0;
    v = random_vec(2, 4, 10, 20, 100000, 40, 20);
    drive(v, 0);
    while (!out_valid) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (!out_valid || in_ready) begin failures++; $display("FAIL back-pressure"); end
    #1 out_ready = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
