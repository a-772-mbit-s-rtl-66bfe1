// M_A storage: a-priori metric increments of every symbol on every tree level.
//
// M_A(s) on level i is the sum of |L^A_{i,b}| over the bits b of s that disagree with the sign
// of the a-priori LLR L^A_{i,b} (bit 1 favoured by a positive LLR), so the symbol given by the
// LLR signs has M_A = 0 and all values are non-negative. The table holds 2^Q_MAX entries per
// level; entries of symbols that do not exist for the run-time order q are set to all ones.
//
// Timing: start (one cycle, together with the load of the LLR input registers) writes the row of
// the top level mt-1 at the end of that cycle; the rows of levels mt-2, ..., 0 follow one per
// cycle. So the row of level k is ready before the tree search can first reach that level, and
// one row calculator serves all levels. Computing the table alongside the first cycles of the
// search follows the document; the one-row-per-cycle schedule is this design's choice.
module sd_ma_storage #(
  parameter int unsigned MT_MAX = 4,
  parameter int unsigned Q_MAX  = 6,
  parameter int unsigned W_L    = 8,   // a-priori LLR width (signed)
  parameter int unsigned W_M    = 20   // metric width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [2:0]              mt,                    // run-time antennas, 1..MT_MAX
  input  logic [3:0]              q,                     // run-time bits per symbol, 2..Q_MAX
  input  logic signed [W_L-1:0]   la    [MT_MAX][Q_MAX], // a-priori LLRs (held during a search)
  output logic [W_M-1:0]          ma    [MT_MAX][2**Q_MAX],
  output logic [MT_MAX-1:0]       row_ok                 // row written for the current vector
);
  import sd_pkg::*;
  localparam int unsigned QH = Q_MAX / 2;
  localparam int unsigned NS = 2 ** Q_MAX;
  localparam int unsigned LV = (MT_MAX > 1) ? $clog2(MT_MAX) : 1;

  logic [2:0]     wr_lvl, wr_lvl_q;
  logic           busy;
  logic [W_M-1:0] row [NS];

  assign wr_lvl = start ? (mt - 3'd1) : wr_lvl_q;

  // Row calculator for level wr_lvl.
  always_comb begin
    int qh, p, re, im, bits;
    logic [W_M-1:0] acc;
    logic signed [W_L-1:0] l;
    logic [W_L-1:0] mag;
    qh = int'(q) / 2;
    p  = 1 << qh;
    for (int s = 0; s < NS; s++) begin
      re  = s % (1 << QH);
      im  = s / (1 << QH);
      acc = '0;
      bits = sym_bits(re, im, qh);
      for (int b = 0; b < Q_MAX; b++) begin
        l   = la[wr_lvl[LV-1:0]][b];
        mag = (l < 0) ? W_L'(-l) : W_L'(l);
        if (b < int'(q) && (((bits >> b) & 1) == 1) != (l > 0)) acc = acc + W_M'(mag);
      end
      row[s] = (re >= p || im >= p) ? {W_M{1'b1}} : acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_lvl_q <= '0;
      busy     <= 1'b0;
      row_ok   <= '0;
      for (int k = 0; k < MT_MAX; k++)
        for (int s = 0; s < NS; s++) ma[k][s] <= '0;
    end else begin
      if (start || busy) begin
        for (int s = 0; s < NS; s++) ma[wr_lvl[LV-1:0]][s] <= row[s];
        wr_lvl_q <= wr_lvl - 3'd1;
        busy     <= (wr_lvl != 3'd0);
      end
      if (start) row_ok <= MT_MAX'(1) << wr_lvl;
      else if (busy) row_ok[wr_lvl[LV-1:0]] <= 1'b1;
    end
  end
endmodule
