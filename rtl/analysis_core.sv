// analysis_core: arithmetic of a polyphase analysis filter.
//
// Inputs are the samples seen by the two branches for one output: x1[j] is
// the sample under tap h[2j] (filter 1, the odd-numbered taps h1, h3, ...
// when counting from 1) and x2[j] the sample under h[2j+1] (filter 2).
// m1/m2 mask taps that would reach before the first sample of a line or a
// frame (zero padding). The core registers the shifted taps, sums each
// branch with a branch_sum chain and forms
//     lp = (F1 + F2) / 2      hp = (F2 - F1) / 2
// with one adder and one subtractor. The high-pass taps are thus the
// low-pass taps with alternating signs, as in the published filter pair.
// The halving (an arithmetic right shift) is this design's normalisation:
// it makes the analysis/synthesis pair reconstruct with unit gain.
// Results and tag_out appear LATENCY cycles after the inputs.
module analysis_core
  import filt_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned NT = ANA_TAPS,
  localparam int unsigned AW      = DW + GUARD_W,
  localparam int unsigned NB      = NT / 2,
  localparam int unsigned ALAT    = adder_latency(AW),
  localparam int unsigned LATENCY = 1 + (NB + 1) * ALAT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  coef_t         coef   [NT],
  input  tag_t          tag_in,
  input  logic [DW-1:0] x1     [NB],
  input  logic          m1     [NB],
  input  logic [DW-1:0] x2     [NB],
  input  logic          m2     [NB],
  output tag_t          tag_out,
  output logic [DW-1:0] lp,
  output logic [DW-1:0] hp
);
  // Power-of-two tap: wired arithmetic shift of the sign-extended sample.
  function automatic logic [AW-1:0] tap(input logic [DW-1:0] x, input coef_t c, input logic m);
    logic signed [AW-1:0] xe;
    xe = AW'(signed'(x));
    return (c.nz && m) ? AW'(xe >>> c.shift) : '0;
  endfunction

  logic [AW-1:0] t1 [NB], t2 [NB];
  logic          n1 [NB], n2 [NB];

  always_ff @(posedge clk) begin
    for (int j = 0; j < NB; j++) begin
      t1[j] <= tap(x1[j], coef[2*j], m1[j]);
      n1[j] <= coef[2*j].nz & coef[2*j].neg & m1[j];
      t2[j] <= tap(x2[j], coef[2*j+1], m2[j]);
      n2[j] <= coef[2*j+1].nz & coef[2*j+1].neg & m2[j];
    end
  end

  logic [AW-1:0] f1, f2, sum_lp, sum_hp;

  branch_sum #(.W(AW), .NTERMS(NB)) u_f1 (.clk(clk), .term(t1), .neg(n1), .sum(f1));
  branch_sum #(.W(AW), .NTERMS(NB)) u_f2 (.clk(clk), .term(t2), .neg(n2), .sum(f2));

  prefix_addsub #(.WIDTH(AW)) u_add (.clk(clk), .a(f2), .b(f1), .sub(1'b0), .s(sum_lp));
  prefix_addsub #(.WIDTH(AW)) u_sub (.clk(clk), .a(f2), .b(f1), .sub(1'b1), .s(sum_hp));

  logic signed [AW-1:0] lp_half, hp_half;
  assign lp_half = signed'(sum_lp) >>> 1;
  assign hp_half = signed'(sum_hp) >>> 1;
  assign lp = lp_half[DW-1:0];
  assign hp = hp_half[DW-1:0];

  tag_pipe #(.DEPTH(LATENCY)) u_tag (.clk(clk), .rst_n(rst_n), .d(tag_in), .q(tag_out));
endmodule
