// analysis_pyramid: three-step analysis filter bank.
//
// Step 1 splits the IMG_W-wide image into four quarter-size bands and keeps
// splitting the low/low band: step 2 works on it at IMG_W/2, step 3 at
// IMG_W/4, giving ten bands in all. Band numbering follows the paths of
// the published pyramid: step 1 gives VIII (low X, high Y), IX (high X, low Y) and
// X (high X, high Y); step 2 gives V, VI, VII the same way; step 3 gives
// I (low/low), II, III and IV. All steps use the same coefficient set.
// Each step is its own hardware and runs whenever its input is valid: step
// 2 is busy a quarter of the time of step 1, step 3 a sixteenth.
module analysis_pyramid
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
  output bands_t            step1,   // ll unused downstream of step 2; lh=VIII hl=IX hh=X
  output bands_t            step2,   // lh=V hl=VI hh=VII
  output bands_t            step3    // ll=I lh=II hl=III hh=IV
);
  analysis_stage #(.IMG_W(IMG_W)) u_s1 (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(in_valid), .in_sol(in_sol), .in_sof(in_sof), .in_data(in_data),
    .bands(step1)
  );

  analysis_stage #(.IMG_W(IMG_W / 2)) u_s2 (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(step1.tag.valid), .in_sol(step1.tag.sol), .in_sof(step1.tag.sof),
    .in_data(step1.ll),
    .bands(step2)
  );

  analysis_stage #(.IMG_W(IMG_W / 4)) u_s3 (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(step2.tag.valid), .in_sol(step2.tag.sol), .in_sof(step2.tag.sof),
    .in_data(step2.ll),
    .bands(step3)
  );
endmodule
