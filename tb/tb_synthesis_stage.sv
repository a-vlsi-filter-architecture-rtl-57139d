// tb_synthesis_stage: two frames of random 8x6 band sets (random idle
// cycles) through one synthesis level. Every 2x2 output block is compared
// with the separable reference synthesis (columns, then rows) and must
// appear exactly 2 x 29 = 58 cycles after its band sample.
module tb_synthesis_stage;
  import filt_pkg::*;
  import filt_ref_pkg::*;

  logic clk = 1'b1;
  always #5 clk = ~clk;

  localparam int BW = 8, BH = 6, LAT = 58;

  int checks = 0, failures = 0, cyc = 0, gaps = 0;
  logic rst_n;
  coef_t dana [ANA_TAPS];
  coef_t coef [SYN_TAPS];
  bands_t bands;
  block_t blk;

  synthesis_stage #(.BAND_W(BW)) dut (.clk(clk), .rst_n(rst_n), .coef(coef), .bands(bands), .blk(blk));

  typedef struct { int t; int p [4]; bit sol; bit sof; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    #1;
    cyc++;
    if (blk.tag.valid) begin
      exp_t e;
      bit bad;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        e = q.pop_front();
        bad = (e.t != cyc) || (blk.tag.sol != e.sol) || (blk.tag.sof != e.sof);
        for (int i = 0; i < 4; i++)
          if (int'(signed'(blk.px[i / 2][i % 2])) != e.p[i]) bad = 1'b1;
        if (bad) begin
          failures++;
          if (failures < 10)
            $display("cyc %0d (exp %0d): %0d %0d %0d %0d / %0d %0d %0d %0d", cyc, e.t,
                     signed'(blk.px[0][0]), signed'(blk.px[0][1]), signed'(blk.px[1][0]),
                     signed'(blk.px[1][1]), e.p[0], e.p[1], e.p[2], e.p[3]);
        end
      end
    end else if (q.size() > 0 && q[0].t < cyc) begin
      failures++; void'(q.pop_front());
      $display("missing output at %0d", cyc);
    end
  end

  initial begin
    arr_t ll, lh, hl, hh, p00, p01, p10, p11;
    default_coefs(dana, coef);
    rst_n = 1'b0;
    bands = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 2; fr++) begin
      ll = new[BW * BH]; lh = new[BW * BH]; hl = new[BW * BH]; hh = new[BW * BH];
      for (int i = 0; i < BW * BH; i++) begin
        ll[i] = int'($urandom_range(0, 8000));
        lh[i] = int'($urandom_range(0, 2000)) - 1000;
        hl[i] = int'($urandom_range(0, 2000)) - 1000;
        hh[i] = int'($urandom_range(0, 1000)) - 500;
      end
      syn2d(ll, lh, hl, hh, BW, BH, coef, p00, p01, p10, p11);
      for (int r = 0; r < BH; r++) begin
        for (int c = 0; c < BW; c++) begin
          int k;
          k = r * BW + c;
          @(negedge clk);
          while ($urandom_range(0, 4) == 0) begin
            bands.tag.valid = 1'b0; gaps++;
            @(negedge clk);
          end
          bands.tag = '{valid: 1'b1, sol: c == 0, sof: c == 0 && r == 0};
          bands.ll = DATA_W'(ll[k]); bands.lh = DATA_W'(lh[k]);
          bands.hl = DATA_W'(hl[k]); bands.hh = DATA_W'(hh[k]);
          q.push_back('{cyc + LAT, '{p00[k], p01[k], p10[k], p11[k]}, c == 0, c == 0 && r == 0});
        end
      end
      @(negedge clk);
      bands.tag.valid = 1'b0;
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
