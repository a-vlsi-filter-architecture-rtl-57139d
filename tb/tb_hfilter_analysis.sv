// tb_hfilter_analysis: feeds random lines (with random idle cycles between
// samples, two frames) to the X analysis filter and compares every output
// pair with the direct convolution of the reference model. Each pair must
// leave exactly LATENCY = 43 cycles after the even-position sample that
// completes it, and carry that sample's sol/sof flags.
module tb_hfilter_analysis;
  import filt_pkg::*;
  import filt_ref_pkg::*;

  logic clk = 1'b1;
  always #5 clk = ~clk;

  localparam int LW = 24, NLINES = 10, LAT = 43;

  int checks = 0, failures = 0, cyc = 0, gaps = 0;
  logic rst_n;
  coef_t coef [ANA_TAPS];
  coef_t dsyn [SYN_TAPS];
  logic in_valid, in_sol, in_sof;
  logic [DATA_W-1:0] in_data;
  logic out_valid, out_sol, out_sof;
  logic [DATA_W-1:0] out_lp, out_hp;

  hfilter_analysis dut (.clk(clk), .rst_n(rst_n), .coef(coef),
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
            $display("cyc %0d (exp %0d): lp %0d/%0d hp %0d/%0d sol %b/%b", cyc, e.t,
                     signed'(out_lp), e.lp, signed'(out_hp), e.hp, out_sol, e.sol);
        end
      end
    end else if (q.size() > 0 && q[0].t < cyc) begin
      failures++; void'(q.pop_front());
      $display("missing output at %0d", cyc);
    end
  end

  initial begin
    arr_t line, lp, hp;
    default_coefs(coef, dsyn);
    rst_n = 1'b0; in_valid = 1'b0; in_sol = 1'b0; in_sof = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 2; fr++) begin
      for (int l = 0; l < NLINES; l++) begin
        line = new[LW];
        // Pixels, and one line of signed samples.
        for (int i = 0; i < LW; i++)
          line[i] = (l == 3) ? int'($urandom_range(0, 8191)) - 4096
                             : int'($urandom_range(0, 255)) << FRAC_BITS;
        ana1d(line, coef, lp, hp);
        for (int i = 0; i < LW; i++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin
            in_valid = 1'b0; gaps++;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_sol = (i == 0);
          in_sof = (i == 0) && (l == 0);
          in_data = DATA_W'(line[i]);
          if (i % 2 == 0) q.push_back('{cyc + LAT, lp[i / 2], hp[i / 2], i == 0, i == 0 && l == 0});
        end
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (q.size() != 0 || gaps == 0) begin failures++; $display("left %0d, gaps %0d", q.size(), gaps); end
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
