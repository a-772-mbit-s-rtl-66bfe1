// End-to-end testbench of the three-core chip at its default parameters.
// All three cores run at the same time on their own streams of random vectors, covering every
// run-time modulation each core supports and 1 to 4 antennas. Results are compared with an
// exhaustive max-log reference (sd_ref_pkg) where that search is small enough; 4x4 vectors with
// 64 symbols per antenna use noise-free inputs with the LLR clipping level at zero, whose result
// is known in closed form (extrinsic LLR = -prior, map = sent bits) and which must take the
// minimum of M_T + 2 cycles. The traversal steps (first child taken, child rejected with its
// level kept open, sibling taken, sibling pruned alone), leaf updates that replace the map
// solution, LLR clipping, the cycle limit and output back-pressure are counted; each must occur.
module tb_sd_asic;
  import sd_ref_pkg::*;
  localparam int W_Y = 12, W_L = 8, W_M = 20, MC_SHIFT = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic c2_in_valid = 1'b0, c2_in_ready, c2_out_valid, c2_out_ready = 1'b1;
  logic [2:0] c2_in_mt = 3'd1;
  logic [3:0] c2_in_q = 4'd2;
  logic [W_M-1:0] c2_in_clip = '0;
  logic [15:0] c2_in_max_cyc = '0;
  logic signed [W_Y-1:0] c2_in_y_re [4], c2_in_y_im [4], c2_in_r_re [4][4], c2_in_r_im [4][4];
  logic signed [W_L-1:0] c2_in_la [4][2], c2_out_le [4][2];
  logic [1:0] c2_out_xmap [4];
  logic [15:0] c2_out_cycles;
  logic c4_in_valid = 1'b0, c4_in_ready, c4_out_valid, c4_out_ready = 1'b1;
  logic [2:0] c4_in_mt = 3'd1;
  logic [3:0] c4_in_q = 4'd2;
  logic [W_M-1:0] c4_in_clip = '0;
  logic [15:0] c4_in_max_cyc = '0;
  logic signed [W_Y-1:0] c4_in_y_re [4], c4_in_y_im [4], c4_in_r_re [4][4], c4_in_r_im [4][4];
  logic signed [W_L-1:0] c4_in_la [4][4], c4_out_le [4][4];
  logic [3:0] c4_out_xmap [4];
  logic [15:0] c4_out_cycles;
  logic c6_in_valid = 1'b0, c6_in_ready, c6_out_valid, c6_out_ready = 1'b1;
  logic [2:0] c6_in_mt = 3'd1;
  logic [3:0] c6_in_q = 4'd2;
  logic [W_M-1:0] c6_in_clip = '0;
  logic [15:0] c6_in_max_cyc = '0;
  logic signed [W_Y-1:0] c6_in_y_re [4], c6_in_y_im [4], c6_in_r_re [4][4], c6_in_r_im [4][4];
  logic signed [W_L-1:0] c6_in_la [4][6], c6_out_le [4][6];
  logic [5:0] c6_out_xmap [4];
  logic [15:0] c6_out_cycles;

  int checks = 0, failures = 0;
  int n_go_v = 0, n_open_v = 0, n_go_h = 0, n_prune_h = 0, n_new_map = 0, n_clipped = 0;
  int n_limit = 0, n_backpressure = 0, n_peak = 0, n_vec = 0;
  int cyc2 = 0, cyc4 = 0, cyc6 = 0;

  sd_asic dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // Mechanism counters, observed inside the Q_MAX=2 core.
  always @(posedge clk) begin
    case (int'(dut.u_core_q2.action))
      1: n_go_v++;
      2: n_open_v++;
      3: n_go_h++;
      4: n_prune_h++;
      default: ;
    endcase
    if (dut.u_core_q2.upd && dut.u_core_q2.map_valid &&
        dut.u_core_q2.leaf_m < dut.u_core_q2.u_prune.lam_map) n_new_map++;
  end
  // Mechanism counters, observed inside the Q_MAX=4 core.
  always @(posedge clk) begin
    case (int'(dut.u_core_q4.action))
      1: n_go_v++;
      2: n_open_v++;
      3: n_go_h++;
      4: n_prune_h++;
      default: ;
    endcase
    if (dut.u_core_q4.upd && dut.u_core_q4.map_valid &&
        dut.u_core_q4.leaf_m < dut.u_core_q4.u_prune.lam_map) n_new_map++;
  end
  // Mechanism counters, observed inside the Q_MAX=6 core.
  always @(posedge clk) begin
    case (int'(dut.u_core_q6.action))
      1: n_go_v++;
      2: n_open_v++;
      3: n_go_h++;
      4: n_prune_h++;
      default: ;
    endcase
    if (dut.u_core_q6.upd && dut.u_core_q6.map_valid &&
        dut.u_core_q6.leaf_m < dut.u_core_q6.u_prune.lam_map) n_new_map++;
  end

  // Detects one vector on the Q_MAX=2 core and checks the result.
  task automatic run_c2(vec_t v, int max_cyc, int mode, ref int ncyc);
    res_t r;
    int cyc;
    bit bad;
    c2_in_mt = 3'(v.mt); c2_in_q = 4'(v.q); c2_in_clip = W_M'(v.clip); c2_in_max_cyc = 16'(max_cyc);
    for (int j = 0; j < 4; j++) begin
      c2_in_y_re[j] = W_Y'(v.y_re[j]); c2_in_y_im[j] = W_Y'(v.y_im[j]);
      for (int i = 0; i < 4; i++) begin
        c2_in_r_re[j][i] = W_Y'(v.r_re[j][i]); c2_in_r_im[j][i] = W_Y'(v.r_im[j][i]);
      end
      for (int b = 0; b < 2; b++) c2_in_la[j][b] = W_L'(v.la[j][b]);
    end
    c2_in_valid = 1'b1;
    do @(posedge clk); while (!c2_in_ready);
    #1 c2_in_valid = 1'b0;
    if (mode == 3) begin
      // hold the output for a few cycles: the core must keep it and refuse new input
      c2_out_ready = 1'b0;
      while (!c2_out_valid) @(posedge clk);
      repeat (4) @(posedge clk);
      checks++;
      if (!c2_out_valid || c2_in_ready) begin failures++; $display("FAIL c2 back-pressure"); end
      else n_backpressure++;
      #1 c2_out_ready = 1'b1;
    end
    while (!c2_out_valid) @(posedge clk);
    cyc = int'(c2_out_cycles);
    ncyc += cyc;
    #1;
    checks++;
    if (cyc < v.mt + 2) begin failures++; $display("FAIL c2 %0d cycles", cyc); end
    if (max_cyc != 0) begin
      checks++;
      if (cyc > max_cyc + 1) begin failures++; $display("FAIL c2 limit"); end
      if (cyc == max_cyc + 1) n_limit++;
    end
    if (mode == 1) begin
      // exact receive vector, clip 0: LLRs are -L^A, map bits are the sent ones, M_T+2 cycles
      bad = (cyc != v.mt + 2);
      for (int j = 0; j < v.mt; j++)
        for (int b = 0; b < v.q; b++)
          if (int'(c2_out_le[j][b]) != -v.la[j][b]) bad = 1'b1;
      checks++;
      if (bad) begin failures++; $display("FAIL c2 peak case cycles=%0d", cyc); end
      else n_peak++;
    end else if (mode != 2) begin
      r = detect(v, MC_SHIFT, W_M, W_L);
      bad = 1'b0;
      for (int j = 0; j < 4; j++) begin
        for (int b = 0; b < 2; b++)
          if (int'(c2_out_le[j][b]) != r.le[j][b]) bad = 1'b1;
        if (r.ties == 1 && j < v.mt && int'(c2_out_xmap[j]) != r.xmap[j]) bad = 1'b1;
      end
      for (int j = 0; j < v.mt; j++)
        for (int b = 0; b < v.q; b++) begin
          int mag;
          mag = r.le[j][b] + v.la[j][b];
          if (mag < 0) mag = -mag;
          if (mag == v.clip) n_clipped++;
        end
      checks++;
      if (bad) begin failures++; $display("FAIL c2 mt=%0d q=%0d clip=%0d", v.mt, v.q, v.clip); end
    end
  endtask

  // Detects one vector on the Q_MAX=4 core and checks the result.
  task automatic run_c4(vec_t v, int max_cyc, int mode, ref int ncyc);
    res_t r;
    int cyc;
    bit bad;
    c4_in_mt = 3'(v.mt); c4_in_q = 4'(v.q); c4_in_clip = W_M'(v.clip); c4_in_max_cyc = 16'(max_cyc);
    for (int j = 0; j < 4; j++) begin
      c4_in_y_re[j] = W_Y'(v.y_re[j]); c4_in_y_im[j] = W_Y'(v.y_im[j]);
      for (int i = 0; i < 4; i++) begin
        c4_in_r_re[j][i] = W_Y'(v.r_re[j][i]); c4_in_r_im[j][i] = W_Y'(v.r_im[j][i]);
      end
      for (int b = 0; b < 4; b++) c4_in_la[j][b] = W_L'(v.la[j][b]);
    end
    c4_in_valid = 1'b1;
    do @(posedge clk); while (!c4_in_ready);
    #1 c4_in_valid = 1'b0;
    if (mode == 3) begin
      // hold the output for a few cycles: the core must keep it and refuse new input
      c4_out_ready = 1'b0;
      while (!c4_out_valid) @(posedge clk);
      repeat (4) @(posedge clk);
      checks++;
      if (!c4_out_valid || c4_in_ready) begin failures++; $display("FAIL c4 back-pressure"); end
      else n_backpressure++;
      #1 c4_out_ready = 1'b1;
    end
    while (!c4_out_valid) @(posedge clk);
    cyc = int'(c4_out_cycles);
    ncyc += cyc;
    #1;
    checks++;
    if (cyc < v.mt + 2) begin failures++; $display("FAIL c4 %0d cycles", cyc); end
    if (max_cyc != 0) begin
      checks++;
      if (cyc > max_cyc + 1) begin failures++; $display("FAIL c4 limit"); end
      if (cyc == max_cyc + 1) n_limit++;
    end
    if (mode == 1) begin
      // exact receive vector, clip 0: LLRs are -L^A, map bits are the sent ones, M_T+2 cycles
      bad = (cyc != v.mt + 2);
      for (int j = 0; j < v.mt; j++)
        for (int b = 0; b < v.q; b++)
          if (int'(c4_out_le[j][b]) != -v.la[j][b]) bad = 1'b1;
      checks++;
      if (bad) begin failures++; $display("FAIL c4 peak case cycles=%0d", cyc); end
      else n_peak++;
    end else if (mode != 2) begin
      r = detect(v, MC_SHIFT, W_M, W_L);
      bad = 1'b0;
      for (int j = 0; j < 4; j++) begin
        for (int b = 0; b < 4; b++)
          if (int'(c4_out_le[j][b]) != r.le[j][b]) bad = 1'b1;
        if (r.ties == 1 && j < v.mt && int'(c4_out_xmap[j]) != r.xmap[j]) bad = 1'b1;
      end
      for (int j = 0; j < v.mt; j++)
        for (int b = 0; b < v.q; b++) begin
          int mag;
          mag = r.le[j][b] + v.la[j][b];
          if (mag < 0) mag = -mag;
          if (mag == v.clip) n_clipped++;
        end
      checks++;
      if (bad) begin failures++; $display("FAIL c4 mt=%0d q=%0d clip=%0d", v.mt, v.q, v.clip); end
    end
  endtask

  // Detects one vector on the Q_MAX=6 core and checks the result.
  task automatic run_c6(vec_t v, int max_cyc, int mode, ref int ncyc);
    res_t r;
    int cyc;
    bit bad;
    c6_in_mt = 3'(v.mt); c6_in_q = 4'(v.q); c6_in_clip = W_M'(v.clip); c6_in_max_cyc = 16'(max_cyc);
    for (int j = 0; j < 4; j++) begin
      c6_in_y_re[j] = W_Y'(v.y_re[j]); c6_in_y_im[j] = W_Y'(v.y_im[j]);
      for (int i = 0; i < 4; i++) begin
        c6_in_r_re[j][i] = W_Y'(v.r_re[j][i]); c6_in_r_im[j][i] = W_Y'(v.r_im[j][i]);
      end
      for (int b = 0; b < 6; b++) c6_in_la[j][b] = W_L'(v.la[j][b]);
    end
    c6_in_valid = 1'b1;
    do @(posedge clk); while (!c6_in_ready);
    #1 c6_in_valid = 1'b0;
    if (mode == 3) begin
      // hold the output for a few cycles: the core must keep it and refuse new input
      c6_out_ready = 1'b0;
      while (!c6_out_valid) @(posedge clk);
      repeat (4) @(posedge clk);
      checks++;
      if (!c6_out_valid || c6_in_ready) begin failures++; $display("FAIL c6 back-pressure"); end
      else n_backpressure++;
      #1 c6_out_ready = 1'b1;
    end
    while (!c6_out_valid) @(posedge clk);
    cyc = int'(c6_out_cycles);
    ncyc += cyc;
    #1;
    checks++;
    if (cyc < v.mt + 2) begin failures++; $display("FAIL c6 %0d cycles", cyc); end
    if (max_cyc != 0) begin
      checks++;
      if (cyc > max_cyc + 1) begin failures++; $display("FAIL c6 limit"); end
      if (cyc == max_cyc + 1) n_limit++;
    end
    if (mode == 1) begin
      // exact receive vector, clip 0: LLRs are -L^A, map bits are the sent ones, M_T+2 cycles
      bad = (cyc != v.mt + 2);
      for (int j = 0; j < v.mt; j++)
        for (int b = 0; b < v.q; b++)
          if (int'(c6_out_le[j][b]) != -v.la[j][b]) bad = 1'b1;
      checks++;
      if (bad) begin failures++; $display("FAIL c6 peak case cycles=%0d", cyc); end
      else n_peak++;
    end else if (mode != 2) begin
      r = detect(v, MC_SHIFT, W_M, W_L);
      bad = 1'b0;
      for (int j = 0; j < 4; j++) begin
        for (int b = 0; b < 6; b++)
          if (int'(c6_out_le[j][b]) != r.le[j][b]) bad = 1'b1;
        if (r.ties == 1 && j < v.mt && int'(c6_out_xmap[j]) != r.xmap[j]) bad = 1'b1;
      end
      for (int j = 0; j < v.mt; j++)
        for (int b = 0; b < v.q; b++) begin
          int mag;
          mag = r.le[j][b] + v.la[j][b];
          if (mag < 0) mag = -mag;
          if (mag == v.clip) n_clipped++;
        end
      checks++;
      if (bad) begin failures++; $display("FAIL c6 mt=%0d q=%0d clip=%0d", v.mt, v.q, v.clip); end
    end
  endtask

  initial begin
    vec_t v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    fork
      begin : s2
        for (int n = 0; n < 24; n++) begin
          v = random_vec(1 + n % 4, 2, 15, 30, (n % 2) ? 100000 : int'($urandom_range(40, 2)), 60, 20);
          run_c2(v, 0, (n == 5) ? 3 : 0, cyc2);
        end
        v = random_vec(4, 2, 0, 0, 0, 60, 20);
        run_c2(v, 0, 1, cyc2);
      end
      begin : s4
        for (int n = 0; n < 16; n++) begin
          v = random_vec(1 + n % 4, (n % 3 == 0) ? 2 : 4, 12, 30, (n % 2) ? 100000 : int'($urandom_range(40, 2)), 60, 20);
          run_c4(v, 0, 0, cyc4);
        end
        for (int n = 0; n < 4; n++) begin
          v = random_vec(3 + n % 2, 4, 90, 4, 100000, 40, 20);
          run_c4(v, 0, 0, cyc4);
        end
        v = random_vec(4, 4, 60, 10, 100000, 40, 20);
        run_c4(v, 8, 2, cyc4);
        v = random_vec(4, 4, 0, 0, 0, 60, 20);
        run_c4(v, 0, 1, cyc4);
      end
      begin : s6
        for (int n = 0; n < 16; n++) begin
          int q;
          q = (n % 3 == 0) ? 4 : ((n % 3 == 1) ? 6 : 2);
          v = random_vec((q == 6) ? 1 + n % 2 : 1 + n % 4, q, 12, 30, (n % 2) ? 100000 : int'($urandom_range(40, 2)), 30, 10);
          run_c6(v, 0, 0, cyc6);
        end
        v = random_vec(4, 6, 40, 10, 100000, 30, 10);
        run_c6(v, 10, 2, cyc6);
        for (int n = 0; n < 2; n++) begin
          v = random_vec(4, 6, 0, 0, 0, 30, 10);
          run_c6(v, 0, 1, cyc6);
        end
      end
    join
    $display("steps: first-child=%0d child-rejected=%0d sibling=%0d sibling-pruned=%0d new-map=%0d",
             n_go_v, n_open_v, n_go_h, n_prune_h, n_new_map);
    $display("clipped LLRs=%0d cycle-limit hits=%0d back-pressure=%0d peak-rate vectors=%0d",
             n_clipped, n_limit, n_backpressure, n_peak);
    $display("cycles: 4-QAM core %0d, 16-QAM core %0d, 64-QAM core %0d", cyc2, cyc4, cyc6);
    if (n_go_v == 0)  begin failures++; $display("FAIL no first-child step"); end
    if (n_open_v == 0) begin failures++; $display("FAIL no rejected child"); end
    if (n_go_h == 0)  begin failures++; $display("FAIL no sibling step"); end
    if (n_prune_h == 0) begin failures++; $display("FAIL no sibling pruned alone"); end
    if (n_new_map == 0) begin failures++; $display("FAIL map never replaced"); end
    if (n_clipped == 0) begin failures++; $display("FAIL clipping never active"); end
    if (n_limit == 0) begin failures++; $display("FAIL cycle limit never hit"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    if (n_peak != 4) begin failures++; $display("FAIL peak-rate vectors %0d of 4", n_peak); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
