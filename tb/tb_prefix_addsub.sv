// tb_prefix_addsub: checks the pipelined prefix adder/subtractor at the
// three widths of the published size table (16, 20, 24 bits). Random
// operands and operations enter every cycle; each result is compared with
// a + b or a - b computed here, exactly LATENCY cycles later. The latency
// must be 6, 7 and 7 cycles for the three widths.
module tb_prefix_addsub;
  import filt_pkg::*;

  logic clk = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  logic [15:0] a16, b16, s16;
  logic [19:0] a20, b20, s20;
  logic [23:0] a24, b24, s24;
  logic        sub;

  prefix_addsub #(.WIDTH(16)) u16 (.clk(clk), .a(a16), .b(b16), .sub(sub), .s(s16));
  prefix_addsub #(.WIDTH(20)) u20 (.clk(clk), .a(a20), .b(b20), .sub(sub), .s(s20));
  prefix_addsub #(.WIDTH(24)) u24 (.clk(clk), .a(a24), .b(b24), .sub(sub), .s(s24));

  localparam int N = 2000;
  logic [15:0] e16 [N];
  logic [19:0] e20 [N];
  logic [23:0] e24 [N];

  initial begin
    if (u16.LATENCY != 6 || u20.LATENCY != 7 || u24.LATENCY != 7) begin
      failures++;
      $display("latency parameters %0d %0d %0d", u16.LATENCY, u20.LATENCY, u24.LATENCY);
    end
    checks++;
  end

  always @(negedge clk) begin
    // Corner operands now and then: carry through the whole word.
    case ($urandom_range(0, 7))
      0: begin a16 = '1; b16 = 16'd1; a20 = '1; b20 = 20'd1; a24 = '1; b24 = 24'd1; end
      1: begin a16 = '0; b16 = 16'd1; a20 = '0; b20 = 20'd1; a24 = '0; b24 = 24'd1; end
      default: begin
        a16 = 16'($urandom); b16 = 16'($urandom);
        a20 = 20'($urandom); b20 = 20'($urandom);
        a24 = 24'($urandom); b24 = 24'($urandom);
      end
    endcase
    sub = 1'($urandom);
    if (cycle < N) begin
      e16[cycle] = sub ? a16 - b16 : a16 + b16;
      e20[cycle] = sub ? a20 - b20 : a20 + b20;
      e24[cycle] = sub ? a24 - b24 : a24 + b24;
    end
  end

  always @(posedge clk) begin
    #1;
    // After this edge the operands of cycle (cycle - L + 1) are out.
    if (cycle >= 5 && cycle - 5 < N) begin
      checks++;
      if (s16 !== e16[cycle - 5]) begin
        failures++;
        if (failures < 10) $display("16-bit: cycle %0d got %h exp %h", cycle, s16, e16[cycle - 5]);
      end
    end
    if (cycle >= 6 && cycle - 6 < N) begin
      checks += 2;
      if (s20 !== e20[cycle - 6]) begin
        failures++;
        if (failures < 10) $display("20-bit: cycle %0d got %h exp %h", cycle, s20, e20[cycle - 6]);
      end
      if (s24 !== e24[cycle - 6]) begin
        failures++;
        if (failures < 10) $display("24-bit: cycle %0d got %h exp %h", cycle, s24, e24[cycle - 6]);
      end
    end
    cycle++;
    if (cycle == N + 10) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
