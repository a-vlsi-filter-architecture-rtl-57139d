// tb_line_delay: drives a short line delay with random data and a random
// shift enable and compares its output with a queue model: q must be the
// word written DEPTH enabled cycles earlier.
module tb_line_delay;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int DEPTH = 7;

  logic       en;
  logic [9:0] d, q;
  logic [9:0] model [$];

  line_delay #(.WIDTH(10), .DEPTH(DEPTH)) dut (.clk(clk), .en(en), .d(d), .q(q));

  initial begin
    en = 1'b0;
    d  = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (model.size() >= DEPTH) begin
        checks++;
        if (q !== model[model.size() - DEPTH]) begin
          failures++;
          if (failures < 10) $display("step %0d: q=%h exp %h", i, q, model[model.size() - DEPTH]);
        end
      end
      en = ($urandom_range(0, 3) != 0);
      d  = 10'($urandom);
      if (en) model.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
