// analysis_stage: one step of the analysis pyramid.
//
// The X filter splits each input line into low- and high-pass half lines;
// one Y filter then splits the low-pass half image and a second one the
// high-pass half image. Per 2x2 input pixels the stage emits one sample of
// each of the four bands: ll (low X, low Y, the image passed to the next
// step), lh (low X, high Y), hl (high X, low Y) and hh (high X, high Y).
// Both Y filters see identical timing, so the four bands leave together.
// IMG_W is the input line width; the Y filters' line delays are IMG_W/2
// samples long. Input and output use the valid/sol/sof stream of the
// filters; the bands of input rows 2m and 2m-1.. appear while input row 2m
// streams in, 2*LATENCY-ish cycles behind it (see the filters).
module analysis_stage
  import filt_pkg::*;
#(
  parameter int unsigned IMG_W = 720
) (
  input  logic              clk,
  input  logic              rst_n,
  input  coef_t             coef [ANA_TAPS],
  input  logic              in_valid,
  input  logic              in_sol,
  input  logic              in_sof,
  input  logic [DATA_W-1:0] in_data,
  output bands_t            bands
);
  logic              x_valid, x_sol, x_sof;
  logic [DATA_W-1:0] x_lp, x_hp;

  hfilter_analysis #(.DW(DATA_W)) u_x (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(in_valid), .in_sol(in_sol), .in_sof(in_sof), .in_data(in_data),
    .out_valid(x_valid), .out_sol(x_sol), .out_sof(x_sof), .out_lp(x_lp), .out_hp(x_hp)
  );

  logic yl_valid, yl_sol, yl_sof;

  vfilter_analysis #(.DW(DATA_W), .LINE_W(IMG_W / 2)) u_y_lo (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(x_valid), .in_sol(x_sol), .in_sof(x_sof), .in_data(x_lp),
    .out_valid(yl_valid), .out_sol(yl_sol), .out_sof(yl_sof),
    .out_lp(bands.ll), .out_hp(bands.lh)
  );

  // The second Y filter runs in lock step with the first; its flags are
  // identical and left unused.
  logic yh_valid, yh_sol, yh_sof;

  vfilter_analysis #(.DW(DATA_W), .LINE_W(IMG_W / 2)) u_y_hi (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(x_valid), .in_sol(x_sol), .in_sof(x_sof), .in_data(x_hp),
    .out_valid(yh_valid), .out_sol(yh_sol), .out_sof(yh_sof),
    .out_lp(bands.hl), .out_hp(bands.hh)
  );

  assign bands.tag = '{valid: yl_valid, sol: yl_sol, sof: yl_sof};

  // The two Y filters must stay in step.
  assert property (@(posedge clk) disable iff (!rst_n) yl_valid == yh_valid);
endmodule
