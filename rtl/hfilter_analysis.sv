// hfilter_analysis: polyphase horizontal (X) analysis filter.
//
// Splits each line of the input stream into a low-pass and a high-pass half
// line, both subsampled by two. The input commutator sends the samples of
// even position (first, third, ... of the line) to filter 1, which holds
// the taps h0, h2, ..., h8, and the samples of odd position to filter 2
// (h1, h3, ..., h9); the pel delays Z^-1 of each branch advance only when
// that branch receives a sample, so both branches work at half the input
// rate. An output pair is computed when an even-position sample arrives:
//     lp[m] = 1/2 * sum_k h[k] x[2m-k]     hp[m] = 1/2 * sum_k g[k] x[2m-k]
// with g[k] = (-1)^(k+1) h[k] and x[n] = 0 for n < 0 (taps reaching before
// the line start are masked, this design's border rule).
//
// Stream interface: one sample per cycle with in_valid; in_sol marks the
// first sample of a line, in_sof the first of a frame (with in_sol). Lines
// must have an even number of samples. out_* carry one (lp, hp) pair per
// even input sample, LATENCY cycles later, with the same sol/sof flags.
module hfilter_analysis
  import filt_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
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
  // Position in the line, saturating (only needed to mask the first taps).
  logic [3:0] col_q, col;
  logic       odd_q, odd;

  always_comb begin
    col = in_sol ? 4'd0 : ((col_q == 4'd15) ? col_q : col_q + 4'd1);
    odd = in_sol ? 1'b0 : ~odd_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q <= 4'd15;
      odd_q <= 1'b1;
    end else if (in_valid) begin
      col_q <= col;
      odd_q <= odd;
    end
  end

  // Branch pel delays: h1d[j] = x[2m-2-2j], h2d[j] = x[2m-1-2j].
  logic [DW-1:0] h1d [NB-1];
  logic [DW-1:0] h2d [NB];

  always_ff @(posedge clk) begin
    if (in_valid && !odd) begin
      h1d[0] <= in_data;
      for (int j = 1; j < NB - 1; j++) h1d[j] <= h1d[j-1];
    end
    if (in_valid && odd) begin
      h2d[0] <= in_data;
      for (int j = 1; j < NB; j++) h2d[j] <= h2d[j-1];
    end
  end

  logic [DW-1:0] x1 [NB], x2 [NB];
  logic          m1 [NB], m2 [NB];
  tag_t          tin, tout;

  always_comb begin
    for (int j = 0; j < NB; j++) begin
      x1[j] = (j == 0) ? in_data : h1d[(j == 0) ? 0 : j - 1];
      m1[j] = (32'(col) >= 2 * j);
      x2[j] = h2d[j];
      m2[j] = (32'(col) >= 2 * j + 1);
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
