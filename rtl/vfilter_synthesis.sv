// vfilter_synthesis: polyphase vertical (Y) synthesis filter.
//
// The vertical counterpart of hfilter_synthesis: the butterfly forms
// s = lp + hp and d = lp - hp for every column, and the pel delays become
// line delays L^-LINE_W (two on s, two on d: four line delays). For each
// input column it produces the samples of two output rows at once: out0
// belongs to output row 2m+1 and out1 to row 2m+2 of the merged image
// (with this design's analysis filter: original rows 2m-7 and 2m-6). Band
// rows above the first one count as zero.
//
// Stream interface: in_sol starts a band line, in_sof a frame; every line
// has LINE_W valid samples. out_valid marks one (out0, out1) column pair,
// LATENCY cycles after its input.
module vfilter_synthesis
  import filt_pkg::*;
#(
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned LINE_W = 360,
  localparam int unsigned NT = SYN_TAPS,
  localparam int unsigned NB = NT / 2,
  localparam int unsigned AW = DW + GUARD_W,
  localparam int unsigned ALAT = adder_latency(AW),
  localparam int unsigned LATENCY = ALAT + 1 + NB * ALAT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  coef_t         coef [NT],
  input  logic          in_valid,
  input  logic          in_sol,
  input  logic          in_sof,
  input  logic [DW-1:0] in_lp,
  input  logic [DW-1:0] in_hp,
  output logic          out_valid,
  output logic          out_sol,
  output logic          out_sof,
  output logic [DW-1:0] out0,
  output logic [DW-1:0] out1
);
  logic [AW-1:0] lp_e, hp_e, bs, bd;
  assign lp_e = AW'(signed'(in_lp));
  assign hp_e = AW'(signed'(in_hp));

  prefix_addsub #(.WIDTH(AW)) u_add (.clk(clk), .a(lp_e), .b(hp_e), .sub(1'b0), .s(bs));
  prefix_addsub #(.WIDTH(AW)) u_sub (.clk(clk), .a(lp_e), .b(hp_e), .sub(1'b1), .s(bd));

  tag_t tin, bt, tout;
  assign tin = '{valid: in_valid, sol: in_sol, sof: in_sof};
  tag_pipe #(.DEPTH(ALAT)) u_btag (.clk(clk), .rst_n(rst_n), .d(tin), .q(bt));

  logic [2:0] row_q, row;
  always_comb begin
    if (bt.sof)      row = 3'd0;
    else if (bt.sol) row = (row_q == 3'd7) ? row_q : row_q + 3'd1;
    else             row = row_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        row_q <= 3'd7;
    else if (bt.valid) row_q <= row;
  end

  logic [AW-1:0] sq [NB-1], dq [NB-1];
  for (genvar j = 0; j < NB - 1; j++) begin : g_ld
    line_delay #(.WIDTH(AW), .DEPTH(LINE_W)) u_ls (
      .clk(clk), .en(bt.valid), .d((j == 0) ? bs : sq[(j == 0) ? 0 : j - 1]), .q(sq[j])
    );
    line_delay #(.WIDTH(AW), .DEPTH(LINE_W)) u_ldd (
      .clk(clk), .en(bt.valid), .d((j == 0) ? bd : dq[(j == 0) ? 0 : j - 1]), .q(dq[j])
    );
  end

  logic [AW-1:0] s [NB], d [NB];
  logic          ms [NB], md [NB];
  always_comb begin
    for (int j = 0; j < NB; j++) begin
      s[j]  = (j == 0) ? bs : sq[(j == 0) ? 0 : j - 1];
      d[j]  = (j == 0) ? bd : dq[(j == 0) ? 0 : j - 1];
      ms[j] = (32'(row) >= j);
      md[j] = (32'(row) >= j);
    end
  end

  synthesis_core #(.DW(DW), .NT(NT)) u_core (
    .clk(clk), .rst_n(rst_n), .coef(coef), .tag_in(bt),
    .s(s), .ms(ms), .d(d), .md(md),
    .tag_out(tout), .out0(out0), .out1(out1)
  );

  assign out_valid = tout.valid;
  assign out_sol   = tout.valid & tout.sol;
  assign out_sof   = tout.valid & tout.sof;
endmodule
