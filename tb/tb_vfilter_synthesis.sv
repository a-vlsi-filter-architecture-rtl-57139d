// tb_vfilter_synthesis: random band images (LINE_W = 6 columns, 9 rows, two
// frames, random idle cycles) enter the Y synthesis filter; each column
// output pair is compared with the column-wise synthesis sums of the
// reference model and must appear LATENCY = 29 cycles after its input.
module tb_vfilter_synthesis;
  import filt_pkg::*;
  import filt_ref_pkg::*;

  logic clk = 1'b1;
  always #5 clk = ~clk;

  localparam int BW = 6, BH = 9, LAT = 29;

  int checks = 0, failures = 0, cyc = 0, gaps = 0;
  logic rst_n;
  coef_t dana [ANA_TAPS];
  coef_t coef [SYN_TAPS];
  logic in_valid, in_sol, in_sof;
  logic [DATA_W-1:0] in_lp, in_hp;
  logic out_valid, out_sol, out_sof;
  logic [DATA_W-1:0] out0, out1;

  vfilter_synthesis #(.LINE_W(BW)) dut (.clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(in_valid), .in_sol(in_sol), .in_sof(in_sof), .in_lp(in_lp), .in_hp(in_hp),
    .out_valid(out_valid), .out_sol(out_sol), .out_sof(out_sof), .out0(out0), .out1(out1));

  typedef struct { int t; int a; int b; bit sol; bit sof; } exp_t;
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
        if (e.t != cyc || int'(signed'(out0)) != e.a || int'(signed'(out1)) != e.b ||
            out_sol != e.sol || out_sof != e.sof) begin
          failures++;
          if (failures < 10)
            $display("cyc %0d (exp %0d): out0 %0d/%0d out1 %0d/%0d", cyc, e.t,
                     signed'(out0), e.a, signed'(out1), e.b);
        end
      end
    end else if (q.size() > 0 && q[0].t < cyc) begin
      failures++; void'(q.pop_front());
      $display("missing output at %0d", cyc);
    end
  end

  initial begin
    arr_t lp, hp, a, b;
    int r0 [BH][BW], r1 [BH][BW];
    default_coefs(dana, coef);
    rst_n = 1'b0; in_valid = 1'b0; in_sol = 1'b0; in_sof = 1'b0; in_lp = '0; in_hp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 2; fr++) begin
      lp = new[BW * BH]; hp = new[BW * BH];
      for (int i = 0; i < BW * BH; i++) begin
        lp[i] = int'($urandom_range(0, 16000)) - 8000;
        hp[i] = int'($urandom_range(0, 4000)) - 2000;
      end
      for (int c = 0; c < BW; c++) begin
        syn1d(get_col(lp, BW, BH, c), get_col(hp, BW, BH, c), coef, a, b);
        for (int r = 0; r < BH; r++) begin r0[r][c] = a[r]; r1[r][c] = b[r]; end
      end
      for (int r = 0; r < BH; r++) begin
        for (int c = 0; c < BW; c++) begin
          @(negedge clk);
          while ($urandom_range(0, 4) == 0) begin
            in_valid = 1'b0; gaps++;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_sol = (c == 0);
          in_sof = (c == 0) && (r == 0);
          in_lp = DATA_W'(lp[r * BW + c]);
          in_hp = DATA_W'(hp[r * BW + c]);
          q.push_back('{cyc + LAT, r0[r][c], r1[r][c], c == 0, c == 0 && r == 0});
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
