// coef_bank: programmable coefficient registers of one filter type.
//
// Holds NTAPS coefficients of the low-pass prototype, each zero or
// +/- 2**-k (k = 0..7), in the filt_pkg::coef_t code. At reset they take the
// published values (SYNTH = 0: the 10 analysis taps, SYNTH = 1: the 6
// synthesis taps). A write (we, addr, wdata) replaces one coefficient at the
// next clock edge; the original design sets them once before video processing starts,
// to tune the board. coef is the current set, read by every filter of the
// bank. Writes to an address >= NTAPS are ignored.
module coef_bank
  import filt_pkg::*;
#(
  parameter int unsigned NTAPS = ANA_TAPS,
  parameter bit          SYNTH = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [3:0]  addr,
  input  coef_t       wdata,
  output coef_t       coef [NTAPS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++)
        coef[k] <= SYNTH ? syn_default(k) : ana_default(k);
    end else if (we) begin
      for (int k = 0; k < NTAPS; k++)
        if (32'(addr) == k) coef[k] <= wdata;
    end
  end
endmodule
