// Three-core SISO sphere-decoder chip: three independent decoder cores, each supporting up to
// four antennas, built for 4-QAM (Q_MAX = 2), 16-QAM (Q_MAX = 4) and 64-QAM (Q_MAX = 6), the
// last being the reference core. The cores share nothing but clock and reset; each has its own
// valid/ready input and output ports, prefixed c2_, c4_ and c6_. A core with a smaller Q_MAX is
// smaller and faster; any core accepts every modulation up to its Q_MAX at run time. Instancing
// the three cores side by side follows the document; everything around them (common clock,
// direct port access instead of a test interface) is this design's choice. See sd_core for the
// port timing.
module sd_asic #(
  parameter int unsigned MT_MAX   = 4,
  parameter int unsigned W_Y      = 12,
  parameter int unsigned W_L      = 8,
  parameter int unsigned W_M      = 20,
  parameter int unsigned MC_SHIFT = 6,
  parameter int unsigned W_CYC    = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic                  c2_in_valid,
  output logic                  c2_in_ready,
  input  logic [2:0]            c2_in_mt,
  input  logic [3:0]            c2_in_q,
  input  logic [W_M-1:0]        c2_in_clip,
  input  logic [W_CYC-1:0]      c2_in_max_cyc,
  input  logic signed [W_Y-1:0] c2_in_y_re [MT_MAX],
  input  logic signed [W_Y-1:0] c2_in_y_im [MT_MAX],
  input  logic signed [W_Y-1:0] c2_in_r_re [MT_MAX][MT_MAX],
  input  logic signed [W_Y-1:0] c2_in_r_im [MT_MAX][MT_MAX],
  input  logic signed [W_L-1:0] c2_in_la   [MT_MAX][2],
  output logic                  c2_out_valid,
  input  logic                  c2_out_ready,
  output logic signed [W_L-1:0] c2_out_le  [MT_MAX][2],
  output logic [1:0]            c2_out_xmap [MT_MAX],
  output logic [W_CYC-1:0]      c2_out_cycles,
  input  logic                  c4_in_valid,
  output logic                  c4_in_ready,
  input  logic [2:0]            c4_in_mt,
  input  logic [3:0]            c4_in_q,
  input  logic [W_M-1:0]        c4_in_clip,
  input  logic [W_CYC-1:0]      c4_in_max_cyc,
  input  logic signed [W_Y-1:0] c4_in_y_re [MT_MAX],
  input  logic signed [W_Y-1:0] c4_in_y_im [MT_MAX],
  input  logic signed [W_Y-1:0] c4_in_r_re [MT_MAX][MT_MAX],
  input  logic signed [W_Y-1:0] c4_in_r_im [MT_MAX][MT_MAX],
  input  logic signed [W_L-1:0] c4_in_la   [MT_MAX][4],
  output logic                  c4_out_valid,
  input  logic                  c4_out_ready,
  output logic signed [W_L-1:0] c4_out_le  [MT_MAX][4],
  output logic [3:0]            c4_out_xmap [MT_MAX],
  output logic [W_CYC-1:0]      c4_out_cycles,
  input  logic                  c6_in_valid,
  output logic                  c6_in_ready,
  input  logic [2:0]            c6_in_mt,
  input  logic [3:0]            c6_in_q,
  input  logic [W_M-1:0]        c6_in_clip,
  input  logic [W_CYC-1:0]      c6_in_max_cyc,
  input  logic signed [W_Y-1:0] c6_in_y_re [MT_MAX],
  input  logic signed [W_Y-1:0] c6_in_y_im [MT_MAX],
  input  logic signed [W_Y-1:0] c6_in_r_re [MT_MAX][MT_MAX],
  input  logic signed [W_Y-1:0] c6_in_r_im [MT_MAX][MT_MAX],
  input  logic signed [W_L-1:0] c6_in_la   [MT_MAX][6],
  output logic                  c6_out_valid,
  input  logic                  c6_out_ready,
  output logic signed [W_L-1:0] c6_out_le  [MT_MAX][6],
  output logic [5:0]            c6_out_xmap [MT_MAX],
  output logic [W_CYC-1:0]      c6_out_cycles
);

  sd_core #(.MT_MAX(MT_MAX), .Q_MAX(2), .W_Y(W_Y), .W_L(W_L), .W_M(W_M), .MC_SHIFT(MC_SHIFT),
            .W_CYC(W_CYC)) u_core_q2 (
    .clk, .rst_n,
    .in_valid(c2_in_valid), .in_ready(c2_in_ready), .in_mt(c2_in_mt), .in_q(c2_in_q),
    .in_clip(c2_in_clip), .in_max_cyc(c2_in_max_cyc), .in_y_re(c2_in_y_re), .in_y_im(c2_in_y_im),
    .in_r_re(c2_in_r_re), .in_r_im(c2_in_r_im), .in_la(c2_in_la),
    .out_valid(c2_out_valid), .out_ready(c2_out_ready), .out_le(c2_out_le),
    .out_xmap(c2_out_xmap), .out_cycles(c2_out_cycles));

  sd_core #(.MT_MAX(MT_MAX), .Q_MAX(4), .W_Y(W_Y), .W_L(W_L), .W_M(W_M), .MC_SHIFT(MC_SHIFT),
            .W_CYC(W_CYC)) u_core_q4 (
    .clk, .rst_n,
    .in_valid(c4_in_valid), .in_ready(c4_in_ready), .in_mt(c4_in_mt), .in_q(c4_in_q),
    .in_clip(c4_in_clip), .in_max_cyc(c4_in_max_cyc), .in_y_re(c4_in_y_re), .in_y_im(c4_in_y_im),
    .in_r_re(c4_in_r_re), .in_r_im(c4_in_r_im), .in_la(c4_in_la),
    .out_valid(c4_out_valid), .out_ready(c4_out_ready), .out_le(c4_out_le),
    .out_xmap(c4_out_xmap), .out_cycles(c4_out_cycles));

  sd_core #(.MT_MAX(MT_MAX), .Q_MAX(6), .W_Y(W_Y), .W_L(W_L), .W_M(W_M), .MC_SHIFT(MC_SHIFT),
            .W_CYC(W_CYC)) u_core_q6 (
    .clk, .rst_n,
    .in_valid(c6_in_valid), .in_ready(c6_in_ready), .in_mt(c6_in_mt), .in_q(c6_in_q),
    .in_clip(c6_in_clip), .in_max_cyc(c6_in_max_cyc), .in_y_re(c6_in_y_re), .in_y_im(c6_in_y_im),
    .in_r_re(c6_in_r_re), .in_r_im(c6_in_r_im), .in_la(c6_in_la),
    .out_valid(c6_out_valid), .out_ready(c6_out_ready), .out_le(c6_out_le),
    .out_xmap(c6_out_xmap), .out_cycles(c6_out_cycles));
endmodule
