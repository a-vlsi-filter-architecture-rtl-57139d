// prefix_addsub: pipelined parallel-prefix adder / subtractor.
//
// s = a + b (sub = 0) or s = a - b (sub = 1), modulo 2**WIDTH, LATENCY clock
// cycles after the operands are presented. A new operation can start every
// cycle; the pipeline runs freely and carries no valid bit.
//
// How it works, following the generate/propagate formulation of the original design:
//   stage 0   per bit P_i = A_i xor B_i and G_i = A_i and B_i, where B is
//             inverted for a subtraction. The subtraction's extra LSB slice,
//             whose inputs are forced so that it generates a carry, is folded
//             into bit 0 as G_0 | P_0 & sub.
//   stage 1.. one stage per prefix level: bit i combines its group (G, P)
//             with the group 2**l bits below it through the Delta operator,
//             so all carries are formed in parallel (a Kogge-Stone tree is
//             this design's choice of parallel-prefix network).
//   last      S_i = P_i xor carry_i.
// Every stage is registered, so LATENCY = clog2(WIDTH) + 2: 6 cycles for
// 16 bits and 7 for 20 and 24 bits, the pipeline depths reported for the original adders.
module prefix_addsub
  import filt_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  localparam int unsigned LEVELS  = $clog2(WIDTH),
  localparam int unsigned LATENCY = LEVELS + 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] s
);

  // Stage 0: generate / propagate.
  gp_t  [WIDTH-1:0] gp0;
  logic [WIDTH-1:0] p0;
  logic             cin0;

  always_ff @(posedge clk) begin
    for (int i = 0; i < WIDTH; i++) begin
      logic bi;
      bi = b[i] ^ sub;
      p0[i]    <= a[i] ^ bi;
      gp0[i].p <= a[i] ^ bi;
      gp0[i].g <= (a[i] & bi) | ((i == 0) && ((a[i] ^ bi) & sub));
    end
    cin0 <= sub;
  end

  // Prefix levels.
  gp_t  [WIDTH-1:0] gp   [LEVELS+1];
  logic [WIDTH-1:0] pbit [LEVELS+1];
  logic             cin  [LEVELS+1];

  assign gp[0]   = gp0;
  assign pbit[0] = p0;
  assign cin[0]  = cin0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    always_ff @(posedge clk) begin
      for (int i = 0; i < WIDTH; i++) begin
        if (i >= (1 << l)) gp[l+1][i] <= delta(gp[l][i], gp[l][i-(1<<l)]);
        else               gp[l+1][i] <= gp[l][i];
      end
      pbit[l+1] <= pbit[l];
      cin[l+1]  <= cin[l];
    end
  end

  // Sum stage: the carry into bit i is the group generate of bits i-1..0.
  always_ff @(posedge clk) begin
    for (int i = 0; i < WIDTH; i++) begin
      if (i == 0) s[i] <= pbit[LEVELS][0] ^ cin[LEVELS];
      else        s[i] <= pbit[LEVELS][i] ^ gp[LEVELS][i-1].g;
    end
  end

endmodule
