// vfilter_analysis: polyphase vertical (Y) analysis filter.
//
// The same structure as the X filter with the pel delays replaced by line
// delays L^-LINE_W. Filter 1 (taps h0, h2, ..., h8) sees the even rows
// 2m, 2m-2, ..., 2m-8 and filter 2 (h1, ..., h9) the odd rows 2m-1, ...,
// 2m-9. The rows are held in one cascade of nine line delays that advances
// with every input sample, so each delay output presents the sample of the
// current column; a branch delay of the published diagram thus spans two line delays of
// the cascade. Arithmetic happens only while an even row streams in, at
// half the input rate, and every column then yields one (lp, hp) pair:
//     lp = 1/2 sum_k h[k] x[2m-k][c],  hp = 1/2 sum_k g[k] x[2m-k][c]
// with rows above the first one taken as zero (masked taps, this design's
// border rule). Odd rows produce no output.
//
// Stream interface as hfilter_analysis: in_sol starts a line, in_sof (with
// in_sol) a frame, and every line has exactly LINE_W valid samples. Output
// lines appear for even input rows, LATENCY cycles behind their input.
module vfilter_analysis
  import filt_pkg::*;
#(
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned LINE_W = 360,
  localparam int unsigned NT = ANA_TAPS,
  localparam int unsigned NB = NT / 2,
  localparam int unsigned LATENCY = 1 + (NB + 1) * adder_latency(DW + GUARD_W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  coef_t         coef [NT],
  input  logic          in_valid,
  input  logic          in_sol,
  input  logic          in_sof,
  input  logic [DW-1:0] in_data,
  output logic          out_valid,
  output logic          out_sol,
  output logic          out_sof,
  output logic [DW-1:0] out_lp,
  output logic [DW-1:0] out_hp
);
  logic [3:0] row_q, row;
  logic       odd_q, odd;

  always_comb begin
    if (in_sof) begin
      row = 4'd0;
      odd = 1'b0;
    end else if (in_sol) begin
      row = (row_q == 4'd15) ? row_q : row_q + 4'd1;
      odd = ~odd_q;
    end else begin
      row = row_q;
      odd = odd_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q <= 4'd15;
      odd_q <= 1'b1;
    end else if (in_valid) begin
      row_q <= row;
      odd_q <= odd;
    end
  end

  // One cascade of NT-1 line delays: ld_q[k-1] holds the sample of the
  // same column k rows above the incoming one.
  logic [DW-1:0] ld_q [NT-1];

  for (genvar k = 0; k < NT - 1; k++) begin : g_ld
    line_delay #(.WIDTH(DW), .DEPTH(LINE_W)) u_ld (
      .clk(clk), .en(in_valid),
      .d((k == 0) ? in_data : ld_q[(k == 0) ? 0 : k - 1]),
      .q(ld_q[k])
    );
  end

  logic [DW-1:0] x1 [NB], x2 [NB];
  logic          m1 [NB], m2 [NB];
  tag_t          tin, tout;

  always_comb begin
    for (int j = 0; j < NB; j++) begin
      x1[j] = (j == 0) ? in_data : ld_q[(j == 0) ? 0 : 2 * j - 1];
      m1[j] = (32'(row) >= 2 * j);
      x2[j] = ld_q[2 * j];
      m2[j] = (32'(row) >= 2 * j + 1);
    end
    tin.valid = in_valid && !odd;
    tin.sol   = in_sol;
    tin.sof   = in_sof;
  end

  analysis_core #(.DW(DW), .NT(NT)) u_core (
    .clk(clk), .rst_n(rst_n), .coef(coef), .tag_in(tin),
    .x1(x1), .m1(m1), .x2(x2), .m2(m2),
    .tag_out(tout), .lp(out_lp), .hp(out_hp)
  );

  assign out_valid = tout.valid;
  assign out_sol   = tout.valid & tout.sol;
  assign out_sof   = tout.valid & tout.sof;
endmodule
