// branch_sum: one polyphase branch, the published shift-and-add chain.
//
// Adds NTERMS taps, each a sample already multiplied by its power-of-two
// coefficient (a wired shift), with the sign given per tap by neg. The sum
// is formed by a chain of NTERMS pipelined adder/subtractors, as the branch
// is drawn: acc_0 = 0, acc_{j+1} = acc_j +/- term_j. Term j is delayed by
// j adder latencies so that it meets the running sum. A new set of terms is
// accepted every cycle; sum appears LATENCY = NTERMS * adder latency cycles
// later. The running-sum start at 0 (one adder more than strictly needed,
// so the first tap's sign needs no extra negator) is this design's choice.
module branch_sum
  import filt_pkg::*;
#(
  parameter int unsigned W      = 18,
  parameter int unsigned NTERMS = 5,
  localparam int unsigned ALAT    = adder_latency(W),
  localparam int unsigned LATENCY = NTERMS * ALAT
) (
  input  logic         clk,
  input  logic [W-1:0] term [NTERMS],
  input  logic         neg  [NTERMS],
  output logic [W-1:0] sum
);
  logic [W-1:0] acc [NTERMS+1];
  assign acc[0] = '0;

  for (genvar j = 0; j < NTERMS; j++) begin : g_tap
    logic [W:0] td;
    pipe_delay #(.WIDTH(W + 1), .DEPTH(j * ALAT)) u_skew (
      .clk (clk),
      .d   ({neg[j], term[j]}),
      .q   (td)
    );
    prefix_addsub #(.WIDTH(W)) u_add (
      .clk (clk),
      .a   (acc[j]),
      .b   (td[W-1:0]),
      .sub (td[W]),
      .s   (acc[j+1])
    );
  end

  assign sum = acc[NTERMS];
endmodule
