// hfilter_synthesis: polyphase horizontal (X) synthesis filter.
//
// Merges a low-pass and a high-pass half line back into one line at twice
// the sample rate. The filter is the transpose of the analysis structure:
// a butterfly (one adder, one subtractor) first forms s = lp + hp and
// d = lp - hp; two three-tap branches with pel delays on s and d then apply
// the odd- and even-numbered synthesis taps, and each input pair yields two
// output samples, out0 (an odd position) and out1 (the next even position).
// Band samples before the line start count as zero (masked taps).
//
// Stream interface: in_valid/in_sol/in_sof as in the analysis filters, one
// (lp, hp) pair per valid cycle. out_valid marks one (out0, out1) pair,
// LATENCY cycles later. With the analysis filter of this design the pair
// made from band sample m reconstructs input samples 2m-7 and 2m-6.
module hfilter_synthesis
  import filt_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
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
  // Input butterfly.
  logic [AW-1:0] lp_e, hp_e, bs, bd;
  assign lp_e = AW'(signed'(in_lp));
  assign hp_e = AW'(signed'(in_hp));

  prefix_addsub #(.WIDTH(AW)) u_add (.clk(clk), .a(lp_e), .b(hp_e), .sub(1'b0), .s(bs));
  prefix_addsub #(.WIDTH(AW)) u_sub (.clk(clk), .a(lp_e), .b(hp_e), .sub(1'b1), .s(bd));

  tag_t tin, bt, tout;
  assign tin = '{valid: in_valid, sol: in_sol, sof: in_sof};
  tag_pipe #(.DEPTH(ALAT)) u_btag (.clk(clk), .rst_n(rst_n), .d(tin), .q(bt));

  // Position in the band line, saturating.
  logic [2:0] col_q, col;
  assign col = bt.sol ? 3'd0 : ((col_q == 3'd7) ? col_q : col_q + 3'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        col_q <= 3'd7;
    else if (bt.valid) col_q <= col;
  end

  // Pel delays on both butterfly outputs.
  logic [AW-1:0] sd [NB-1], dd [NB-1];
  always_ff @(posedge clk) begin
    if (bt.valid) begin
      sd[0] <= bs;
      dd[0] <= bd;
      for (int j = 1; j < NB - 1; j++) begin
        sd[j] <= sd[j-1];
        dd[j] <= dd[j-1];
      end
    end
  end

  logic [AW-1:0] s [NB], d [NB];
  logic          ms [NB], md [NB];
  always_comb begin
    for (int j = 0; j < NB; j++) begin
      s[j]  = (j == 0) ? bs : sd[(j == 0) ? 0 : j - 1];
      d[j]  = (j == 0) ? bd : dd[(j == 0) ? 0 : j - 1];
      ms[j] = (32'(col) >= j);
      md[j] = (32'(col) >= j);
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
