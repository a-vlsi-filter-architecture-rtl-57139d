// tb_hfilter_synthesis: random band lines (12 samples, 6 lines, two frames,
// random idle cycles) enter the X synthesis filter as (lp, hp) pairs; each
// output pair (out0, out1) is compared with the direct synthesis sums of the
// reference model and must appear exactly LATENCY = 29 cycles after its
// input pair.
module tb_hfilter_synthesis;
  import filt_pkg::*;
  import filt_ref_pkg::*;

  logic clk = 1'b1;
  always #5 clk = ~clk;

  localparam int BW = 12, NLINES = 6, LAT = 29;

  int checks = 0, failures = 0, cyc = 0, gaps = 0;
  logic rst_n;
  coef_t dana [ANA_TAPS];
  coef_t coef [SYN_TAPS];
  logic in_valid, in_sol, in_sof;
  logic [DATA_W-1:0] in_lp, in_hp;
  logic out_valid, out_sol, out_sof;
  logic [DATA_W-1:0] out0, out1;

  hfilter_synthesis dut (.clk(clk), .rst_n(rst_n), .coef(coef),
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
    arr_t lp, hp, y0, y1;
    default_coefs(dana, coef);
    rst_n = 1'b0; in_valid = 1'b0; in_sol = 1'b0; in_sof = 1'b0; in_lp = '0; in_hp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 2; fr++) begin
      for (int l = 0; l < NLINES; l++) begin
        lp = new[BW]; hp = new[BW];
        for (int i = 0; i < BW; i++) begin
          lp[i] = int'($urandom_range(0, 16000)) - 8000;
          hp[i] = int'($urandom_range(0, 4000)) - 2000;
        end
        syn1d(lp, hp, coef, y0, y1);
        for (int i = 0; i < BW; i++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin
            in_valid = 1'b0; gaps++;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_sol = (i == 0);
          in_sof = (i == 0) && (l == 0);
          in_lp = DATA_W'(lp[i]);
          in_hp = DATA_W'(hp[i]);
          q.push_back('{cyc + LAT, y0[i], y1[i], i == 0, i == 0 && l == 0});
        end
        @(negedge clk);
        in_valid = 1'b0;
      end
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
