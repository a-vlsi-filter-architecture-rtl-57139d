// tb_vfilter_analysis: streams random images (LINE_W = 8 columns, 14 rows,
// two frames, random idle cycles) through the Y analysis filter and checks
// every output against the column-wise convolution of the reference model:
// outputs only for even rows, LATENCY = 43 cycles after their input sample.
module tb_vfilter_analysis;
  import filt_pkg::*;
  import filt_ref_pkg::*;

  logic clk = 1'b1;
  always #5 clk = ~clk;

  localparam int LW = 8, H = 14, LAT = 43;

  int checks = 0, failures = 0, cyc = 0, gaps = 0;
  logic rst_n;
  coef_t coef [ANA_TAPS];
  coef_t dsyn [SYN_TAPS];
  logic in_valid, in_sol, in_sof;
  logic [DATA_W-1:0] in_data;
  logic out_valid, out_sol, out_sof;
  logic [DATA_W-1:0] out_lp, out_hp;

  vfilter_analysis #(.LINE_W(LW)) dut (.clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(in_valid), .in_sol(in_sol), .in_sof(in_sof), .in_data(in_data),
    .out_valid(out_valid), .out_sol(out_sol), .out_sof(out_sof), .out_lp(out_lp), .out_hp(out_hp));

  typedef struct { int t; int lp; int hp; bit sol; bit sof; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    #1;
    cyc++;
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        e = q.pop_front();
        if (e.t != cyc || int'(signed'(out_lp)) != e.lp || int'(signed'(out_hp)) != e.hp ||
            out_sol != e.sol || out_sof != e.sof) begin
          failures++;
          if (failures < 10)
            $display("cyc %0d (exp %0d): lp %0d/%0d hp %0d/%0d", cyc, e.t,
                     signed'(out_lp), e.lp, signed'(out_hp), e.hp);
        end
      end
    end else if (q.size() > 0 && q[0].t < cyc) begin
      failures++; void'(q.pop_front());
      $display("missing output at %0d", cyc);
    end
  end

  initial begin
    arr_t img, lp, hp, col;
    int rl [H/2][LW], rh [H/2][LW];
    default_coefs(coef, dsyn);
    rst_n = 1'b0; in_valid = 1'b0; in_sol = 1'b0; in_sof = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 2; fr++) begin
      img = new[LW * H];
      for (int i = 0; i < LW * H; i++) img[i] = int'($urandom_range(0, 8191)) - 4096;
      for (int c = 0; c < LW; c++) begin
        col = get_col(img, LW, H, c);
        ana1d(col, coef, lp, hp);
        for (int m = 0; m < H / 2; m++) begin rl[m][c] = lp[m]; rh[m][c] = hp[m]; end
      end
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < LW; c++) begin
          @(negedge clk);
          while ($urandom_range(0, 4) == 0) begin
            in_valid = 1'b0; gaps++;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_sol = (c == 0);
          in_sof = (c == 0) && (r == 0);
          in_data = DATA_W'(img[r * LW + c]);
          if (r % 2 == 0) q.push_back('{cyc + LAT, rl[r / 2][c], rh[r / 2][c], c == 0, c == 0 && r == 0});
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
