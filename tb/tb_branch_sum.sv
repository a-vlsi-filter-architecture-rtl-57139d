// tb_branch_sum: random signed taps and signs enter a five-term branch
// every cycle; the sum +/- term_j, computed here, must appear exactly
// 5 adder latencies (5 x 7 cycles for 18-bit words) later.
module tb_branch_sum;
  logic clk = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  localparam int W = 18, NT = 5, LAT = 35, N = 1500;

  logic [W-1:0] term [NT];
  logic         neg  [NT];
  logic [W-1:0] sum;
  logic [W-1:0] expv [N];

  branch_sum #(.W(W), .NTERMS(NT)) dut (.clk(clk), .term(term), .neg(neg), .sum(sum));

  initial begin
    checks++;
    if (dut.LATENCY != LAT) begin failures++; $display("LATENCY %0d", dut.LATENCY); end
  end

  always @(negedge clk) begin
    logic [W-1:0] acc;
    acc = '0;
    for (int j = 0; j < NT; j++) begin
      term[j] = W'($urandom);
      neg[j]  = 1'($urandom);
      acc = neg[j] ? acc - term[j] : acc + term[j];
    end
    if (cycle < N) expv[cycle] = acc;
  end

  always @(posedge clk) begin
    #1;
    if (cycle >= LAT - 1 && cycle - (LAT - 1) < N) begin
      checks++;
      if (sum !== expv[cycle - (LAT - 1)]) begin
        failures++;
        if (failures < 10) $display("cycle %0d sum %h exp %h", cycle, sum, expv[cycle - (LAT - 1)]);
      end
    end
    cycle++;
    if (cycle == N + LAT) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (N + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
