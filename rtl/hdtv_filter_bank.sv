// hdtv_filter_bank: analysis and synthesis filter banks of a subband codec.
//
// The analysis side takes an 8-bit luminance raster (IMG_W pixels per line,
// one pixel per valid cycle) and decomposes it in three steps into ten
// subbands with separable, polyphase, power-of-two 2-D filters. The
// synthesis side holds one synthesis level per step; each merges the four
// bands of its step into 2x2 blocks of the finer image. In a codec the
// bands travel through band memory and the vector quantiser between the two
// sides, so the synthesis levels take their bands on their own ports.
//
// Coefficients: one register bank for the analysis filters (10 taps) and
// one for the synthesis filters (6 taps), both reset to the published
// values and writable through coef_we/coef_sel/coef_addr/coef_wdata
// (coef_sel 0: analysis, 1: synthesis), to be set before processing starts.
// Pixels enter as pixel * 2**FRAC_BITS in DATA_W-bit words; all band and
// reconstructed samples use that fixed-point format.
module hdtv_filter_bank
  import filt_pkg::*;
#(
  parameter int unsigned IMG_W = 720
) (
  input  logic        clk,
  input  logic        rst_n,
  // coefficient programming
  input  logic        coef_we,
  input  logic        coef_sel,
  input  logic [3:0]  coef_addr,
  input  coef_t       coef_wdata,
  // analysis input: luminance raster
  input  logic        pix_valid,
  input  logic        pix_sol,
  input  logic        pix_sof,
  input  logic [7:0]  pix,
  // analysis outputs, one band set per step
  output bands_t      ana_step1,
  output bands_t      ana_step2,
  output bands_t      ana_step3,
  // synthesis levels: bands in, 2x2 blocks out
  input  bands_t      syn_in   [3],
  output block_t      syn_out  [3]
);
  coef_t ana_coef [ANA_TAPS];
  coef_t syn_coef [SYN_TAPS];

  coef_bank #(.NTAPS(ANA_TAPS), .SYNTH(1'b0)) u_ana_coef (
    .clk(clk), .rst_n(rst_n), .we(coef_we && !coef_sel), .addr(coef_addr),
    .wdata(coef_wdata), .coef(ana_coef)
  );
  coef_bank #(.NTAPS(SYN_TAPS), .SYNTH(1'b1)) u_syn_coef (
    .clk(clk), .rst_n(rst_n), .we(coef_we && coef_sel), .addr(coef_addr),
    .wdata(coef_wdata), .coef(syn_coef)
  );

  logic [DATA_W-1:0] pix_word;
  assign pix_word = DATA_W'({pix, FRAC_BITS'(0)});

  analysis_pyramid #(.IMG_W(IMG_W)) u_ana (
    .clk(clk), .rst_n(rst_n), .coef(ana_coef),
    .in_valid(pix_valid), .in_sol(pix_sol), .in_sof(pix_sof), .in_data(pix_word),
    .step1(ana_step1), .step2(ana_step2), .step3(ana_step3)
  );

  // Synthesis level k merges the bands of analysis step k+1 (band width
  // IMG_W / 2**(k+1)).
  for (genvar k = 0; k < 3; k++) begin : g_syn
    synthesis_stage #(.BAND_W(IMG_W >> (k + 1))) u_syn (
      .clk(clk), .rst_n(rst_n), .coef(syn_coef),
      .bands(syn_in[k]), .blk(syn_out[k])
    );
  end
endmodule
