// line_delay: one line delay L^-DEPTH of the vertical filters.
//
// A cascade of DEPTH word registers that advances by one word each cycle
// that en is high: q is the word written DEPTH enabled cycles earlier, so
// with DEPTH equal to the line width q holds the sample of the same column
// one line above. The original design builds it as a cascade of TSPC latches; here
// it is a chain of edge-triggered registers with a shift enable (the enable
// is this design's choice, so that the line delay only moves on valid
// samples). No reset: the filters mask taps that reach above the first line.
module line_delay #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 360
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] r [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      r[0] <= d;
      for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
    end
  end

  assign q = r[DEPTH-1];
endmodule
