// tb_analysis_stage: two random 16x12 frames (random idle cycles) through
// one analysis step. The four bands are compared in raster order with the
// separable reference (rows then columns, direct convolution). A band
// sample must leave exactly 2 x 43 = 86 cycles after the input pixel that
// completes it (even row, even column).
module tb_analysis_stage;
  import filt_pkg::*;
  import filt_ref_pkg::*;

  logic clk = 1'b1;
  always #5 clk = ~clk;

  localparam int W = 16, H = 12, LAT = 86;

  int checks = 0, failures = 0, cyc = 0, gaps = 0;
  logic rst_n;
  coef_t coef [ANA_TAPS];
  coef_t dsyn [SYN_TAPS];
  logic in_valid, in_sol, in_sof;
  logic [DATA_W-1:0] in_data;
  bands_t bands;

  analysis_stage #(.IMG_W(W)) dut (.clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(in_valid), .in_sol(in_sol), .in_sof(in_sof), .in_data(in_data), .bands(bands));

  typedef struct { int t; int ll; int lh; int hl; int hh; bit sol; bit sof; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    #1;
    cyc++;
    if (bands.tag.valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        e = q.pop_front();
        if (e.t != cyc || int'(signed'(bands.ll)) != e.ll || int'(signed'(bands.lh)) != e.lh ||
            int'(signed'(bands.hl)) != e.hl || int'(signed'(bands.hh)) != e.hh ||
            bands.tag.sol != e.sol || bands.tag.sof != e.sof) begin
          failures++;
          if (failures < 10)
            $display("cyc %0d (exp %0d): ll %0d/%0d lh %0d/%0d hl %0d/%0d hh %0d/%0d", cyc, e.t,
                     signed'(bands.ll), e.ll, signed'(bands.lh), e.lh,
                     signed'(bands.hl), e.hl, signed'(bands.hh), e.hh);
        end
      end
    end else if (q.size() > 0 && q[0].t < cyc) begin
      failures++; void'(q.pop_front());
      $display("missing output at %0d", cyc);
    end
  end

  initial begin
    arr_t img, ll, lh, hl, hh;
    default_coefs(coef, dsyn);
    rst_n = 1'b0; in_valid = 1'b0; in_sol = 1'b0; in_sof = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 2; fr++) begin
      img = new[W * H];
      for (int i = 0; i < W * H; i++) img[i] = int'($urandom_range(0, 255)) << FRAC_BITS;
      ana2d(img, W, H, coef, ll, lh, hl, hh);
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          while ($urandom_range(0, 4) == 0) begin
            in_valid = 1'b0; gaps++;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_sol = (c == 0);
          in_sof = (c == 0) && (r == 0);
          in_data = DATA_W'(img[r * W + c]);
          if (r % 2 == 0 && c % 2 == 0) begin
            int k;
            k = (r / 2) * (W / 2) + c / 2;
            q.push_back('{cyc + LAT, ll[k], lh[k], hl[k], hh[k], c == 0, c == 0 && r == 0});
          end
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (q.size() != 0 || gaps == 0) begin failures++; $display("left %0d gaps %0d", q.size(), gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
