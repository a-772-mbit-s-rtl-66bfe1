// Testbench of the M_A storage: random a-priori LLRs and run-time configurations; after start
// the rows must appear one per cycle from level mt-1 down, each entry equal to the sum of |L^A|
// over the bits of the symbol that disagree with the LLR signs, non-existent symbols all ones.
module tb_sd_ma_storage;
  localparam int MT_MAX = 4, Q_MAX = 6, NS = 64;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0] mt = 3'd4;
  logic [3:0] q = 4'd6;
  logic signed [7:0] la [MT_MAX][Q_MAX];
  logic [19:0] ma [MT_MAX][NS];
  logic [MT_MAX-1:0] row_ok;
  int checks = 0, failures = 0;

  sd_ma_storage dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_ma(int lvl, int s, int qq);
    int qh, p, re, im, bits, acc;
    qh = qq / 2; p = 1 << qh;
    re = s % 8; im = s / 8;
    if (re >= p || im >= p) return 20'hfffff;
    bits = (re ^ (re >> 1)) | ((im ^ (im >> 1)) << qh);
    acc = 0;
    for (int b = 0; b < qq; b++)
      if ((((bits >> b) & 1) == 1) != (la[lvl][b] > 0)) acc += (la[lvl][b] < 0) ? -la[lvl][b] : la[lvl][b];
    return acc;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      int m, qq;
      m = 1 + n % 4; qq = 2 * (1 + (n / 4) % 3);
      @(negedge clk);
      mt = 3'(m); q = 4'(qq);
      for (int j = 0; j < MT_MAX; j++) for (int b = 0; b < Q_MAX; b++) la[j][b] = 8'($urandom);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // after the start cycle only the top row is ready
      checks++;
      if (row_ok != (4'(1) << (m - 1))) begin failures++; $display("FAIL row_ok %b after start", row_ok); end
      repeat (m - 1) @(negedge clk);
      checks++;
      if (row_ok != 4'((1 << m) - 1)) begin failures++; $display("FAIL row_ok %b at end", row_ok); end
      for (int j = 0; j < m; j++)
        for (int s = 0; s < NS; s++) begin
          checks++;
          if (int'(ma[j][s]) != exp_ma(j, s, qq)) begin
            failures++;
            $display("FAIL lvl %0d sym %0d: %0d exp %0d", j, s, ma[j][s], exp_ma(j, s, qq));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
