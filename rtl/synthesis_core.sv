// synthesis_core: arithmetic of a polyphase synthesis filter.
//
// The synthesis filter is the transpose of the analysis one: the butterfly
// comes first (in the filter that instantiates this core) and gives
// s = lp + hp and d = lp - hp; this core then runs the two half-length
// branches and emits two output samples per input sample:
//     out0 = sum_j f[2j]   * s[m-j]     (taps f1, f3, f5 counting from 1)
//     out1 = sum_j f[2j+1] * d[m-j]     (taps f2, f4, f6)
// With the analysis filter of this design (outputs at even input
// positions), out0 and out1 are the reconstructed samples 2m-7 and 2m-6:
// the pair is an odd sample followed by the next even one. ms/md mask taps
// that reach before the first band sample. Results and tag_out appear
// LATENCY cycles after the inputs. Which output phase takes which branch is
// this design's derivation from the published coefficient table.
module synthesis_core
  import filt_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned NT = SYN_TAPS,
  localparam int unsigned AW      = DW + GUARD_W,
  localparam int unsigned NB      = NT / 2,
  localparam int unsigned ALAT    = adder_latency(AW),
  localparam int unsigned LATENCY = 1 + NB * ALAT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  coef_t         coef   [NT],
  input  tag_t          tag_in,
  input  logic [AW-1:0] s      [NB],
  input  logic          ms     [NB],
  input  logic [AW-1:0] d      [NB],
  input  logic          md     [NB],
  output tag_t          tag_out,
  output logic [DW-1:0] out0,
  output logic [DW-1:0] out1
);
  function automatic logic [AW-1:0] tap(input logic [AW-1:0] x, input coef_t c, input logic m);
    return (c.nz && m) ? AW'(signed'(x) >>> c.shift) : '0;
  endfunction

  logic [AW-1:0] t0 [NB], t1 [NB];
  logic          n0 [NB], n1 [NB];

  always_ff @(posedge clk) begin
    for (int j = 0; j < NB; j++) begin
      t0[j] <= tap(s[j], coef[2*j], ms[j]);
      n0[j] <= coef[2*j].nz & coef[2*j].neg & ms[j];
      t1[j] <= tap(d[j], coef[2*j+1], md[j]);
      n1[j] <= coef[2*j+1].nz & coef[2*j+1].neg & md[j];
    end
  end

  logic [AW-1:0] f0, f1;
  branch_sum #(.W(AW), .NTERMS(NB)) u_f0 (.clk(clk), .term(t0), .neg(n0), .sum(f0));
  branch_sum #(.W(AW), .NTERMS(NB)) u_f1 (.clk(clk), .term(t1), .neg(n1), .sum(f1));

  assign out0 = f0[DW-1:0];
  assign out1 = f1[DW-1:0];

  tag_pipe #(.DEPTH(LATENCY)) u_tag (.clk(clk), .rst_n(rst_n), .d(tag_in), .q(tag_out));
endmodule
