// tag_pipe: fixed delay of DEPTH cycles for the stream tag (valid, sol,
// sof) that travels alongside the pipelined arithmetic. Unlike the data
// pipeline it is reset, so no sample appears valid before real data has
// made its way through. DEPTH may be 0.
module tag_pipe
  import filt_pkg::*;
#(
  parameter int unsigned DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  tag_t d,
  output tag_t q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    tag_t r [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) r[i] <= '0;
      end else begin
        r[0] <= d;
        for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
      end
    end
    assign q = r[DEPTH-1];
  end
endmodule
