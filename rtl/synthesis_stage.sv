// synthesis_stage: one level of the synthesis pyramid.
//
// Merges the four bands of one step back into the image of twice the width
// and height. Two Y synthesis filters first rebuild the low-X image from
// (ll, lh) and the high-X image from (hl, hh), each giving two rows per band
// row; two X synthesis filters, one per output row, then merge low-X and
// high-X samples. Every input band sample therefore yields a 2x2 block of
// output samples, px[r][c]. With the analysis stage of this design, the
// block made from band sample (row m, column n) holds original rows
// 2m-7, 2m-6 and columns 2n-7, 2n-6. BAND_W is the band line width; the Y
// filters' line delays have that length.
//
// The block output is this design's choice: it keeps the stage at one band
// sample per cycle without a frame or line reorder buffer, which the
// surrounding codec (band memory, vector quantiser) is expected to provide.
module synthesis_stage
  import filt_pkg::*;
#(
  parameter int unsigned BAND_W = 360
) (
  input  logic   clk,
  input  logic   rst_n,
  input  coef_t  coef [SYN_TAPS],
  input  bands_t bands,
  output block_t blk
);
  logic              l_valid, l_sol, l_sof, h_valid, h_sol, h_sof;
  logic [DATA_W-1:0] l0, l1, h0, h1;

  vfilter_synthesis #(.DW(DATA_W), .LINE_W(BAND_W)) u_y_lo (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(bands.tag.valid), .in_sol(bands.tag.sol), .in_sof(bands.tag.sof),
    .in_lp(bands.ll), .in_hp(bands.lh),
    .out_valid(l_valid), .out_sol(l_sol), .out_sof(l_sof), .out0(l0), .out1(l1)
  );

  vfilter_synthesis #(.DW(DATA_W), .LINE_W(BAND_W)) u_y_hi (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(bands.tag.valid), .in_sol(bands.tag.sol), .in_sof(bands.tag.sof),
    .in_lp(bands.hl), .in_hp(bands.hh),
    .out_valid(h_valid), .out_sol(h_sol), .out_sof(h_sof), .out0(h0), .out1(h1)
  );

  logic e_valid, e_sol, e_sof, o_valid, o_sol, o_sof;

  hfilter_synthesis #(.DW(DATA_W)) u_x_r0 (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(l_valid), .in_sol(l_sol), .in_sof(l_sof), .in_lp(l0), .in_hp(h0),
    .out_valid(e_valid), .out_sol(e_sol), .out_sof(e_sof),
    .out0(blk.px[0][0]), .out1(blk.px[0][1])
  );

  hfilter_synthesis #(.DW(DATA_W)) u_x_r1 (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(l_valid), .in_sol(l_sol), .in_sof(l_sof), .in_lp(l1), .in_hp(h1),
    .out_valid(o_valid), .out_sol(o_sol), .out_sof(o_sof),
    .out0(blk.px[1][0]), .out1(blk.px[1][1])
  );

  assign blk.tag = '{valid: e_valid, sol: e_sol, sof: e_sof};

  assert property (@(posedge clk) disable iff (!rst_n)
                   (l_valid == h_valid) && (e_valid == o_valid));
endmodule
