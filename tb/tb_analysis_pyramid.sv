// tb_analysis_pyramid: a random 64x48 image through the three analysis
// steps. Each step's four bands are compared, in output order, with the
// reference: step 1 on the image, step 2 on the reference low/low band of
// step 1, step 3 on that of step 2. The number of samples of each step
// (32x24, 16x12, 8x6) is checked as well.
module tb_analysis_pyramid;
  import filt_pkg::*;
  import filt_ref_pkg::*;

  logic clk = 1'b1;
  always #5 clk = ~clk;

  localparam int W = 64, H = 48;

  int checks = 0, failures = 0, gaps = 0;
  logic rst_n;
  coef_t coef [ANA_TAPS];
  coef_t dsyn [SYN_TAPS];
  logic in_valid, in_sol, in_sof;
  logic [DATA_W-1:0] in_data;
  bands_t st [3];

  analysis_pyramid #(.IMG_W(W)) dut (.clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(in_valid), .in_sol(in_sol), .in_sof(in_sof), .in_data(in_data),
    .step1(st[0]), .step2(st[1]), .step3(st[2]));

  arr_t rb [3][4];   // reference bands per step: ll, lh, hl, hh
  int   cnt [3];

  for (genvar s = 0; s < 3; s++) begin : g_mon
    always @(posedge clk) begin
      #1;
      if (st[s].tag.valid) begin
        int k;
        k = cnt[s];
        checks++;
        if (k >= rb[s][0].size()) begin
          failures++; $display("step %0d: extra output", s + 1);
        end else if (int'(signed'(st[s].ll)) != rb[s][0][k] || int'(signed'(st[s].lh)) != rb[s][1][k] ||
                     int'(signed'(st[s].hl)) != rb[s][2][k] || int'(signed'(st[s].hh)) != rb[s][3][k] ||
                     st[s].tag.sol != (k % ((W >> (s + 1))) == 0) || st[s].tag.sof != (k == 0)) begin
          failures++;
          if (failures < 10) $display("step %0d sample %0d: ll %0d/%0d hh %0d/%0d", s + 1, k,
                                      signed'(st[s].ll), rb[s][0][k], signed'(st[s].hh), rb[s][3][k]);
        end
        cnt[s]++;
      end
    end
  end

  initial begin
    arr_t img;
    int w, h;
    default_coefs(coef, dsyn);
    cnt = '{0, 0, 0};
    img = new[W * H];
    for (int i = 0; i < W * H; i++) img[i] = int'($urandom_range(0, 255)) << FRAC_BITS;
    ana2d(img, W, H, coef, rb[0][0], rb[0][1], rb[0][2], rb[0][3]);
    ana2d(rb[0][0], W / 2, H / 2, coef, rb[1][0], rb[1][1], rb[1][2], rb[1][3]);
    ana2d(rb[1][0], W / 4, H / 4, coef, rb[2][0], rb[2][1], rb[2][2], rb[2][3]);
    rst_n = 1'b0; in_valid = 1'b0; in_sol = 1'b0; in_sof = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 7) == 0) begin
          in_valid = 1'b0; gaps++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_sol = (c == 0);
        in_sof = (c == 0) && (r == 0);
        in_data = DATA_W'(img[r * W + c]);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (400) @(negedge clk);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (cnt[s] != (W >> (s + 1)) * (H >> (s + 1))) begin
        failures++; $display("step %0d produced %0d samples", s + 1, cnt[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
