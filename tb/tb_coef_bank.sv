// tb_coef_bank: checks that both coefficient banks come out of reset with
// the published coefficient table (written out here as numbers) and that
// writes replace exactly one coefficient.
module tb_coef_bank;
  import filt_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       rst_n, we_a, we_s;
  logic [3:0] addr;
  coef_t      wdata;
  coef_t      ca [10];
  coef_t      cs [6];

  coef_bank #(.NTAPS(10), .SYNTH(1'b0)) u_a (.clk(clk), .rst_n(rst_n), .we(we_a), .addr(addr), .wdata(wdata), .coef(ca));
  coef_bank #(.NTAPS(6),  .SYNTH(1'b1)) u_s (.clk(clk), .rst_n(rst_n), .we(we_s), .addr(addr), .wdata(wdata), .coef(cs));

  // Table as real values: analysis LP and synthesis LP.
  real ta [10] = '{1.0/64, 0.0, -1.0/8, -1.0/128, 1.0, 1.0, -1.0/128, -1.0/8, 0.0, 1.0/64};
  real ts [6]  = '{1.0/128, 1.0/8, 1.0, 1.0, 1.0/8, 1.0/128};
  real exp_a [10];
  real exp_s [6];

  function automatic real val(input coef_t c);
    real v;
    if (!c.nz) return 0.0;
    v = 1.0 / real'(1 << c.shift);
    return c.neg ? -v : v;
  endfunction

  task automatic check_all();
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (val(ca[k]) != exp_a[k]) begin failures++; $display("ana tap %0d = %f exp %f", k, val(ca[k]), exp_a[k]); end
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (val(cs[k]) != exp_s[k]) begin failures++; $display("syn tap %0d = %f exp %f", k, val(cs[k]), exp_s[k]); end
    end
  endtask

  initial begin
    exp_a = ta;
    exp_s = ts;
    rst_n = 1'b0; we_a = 1'b0; we_s = 1'b0; addr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    // Random writes.
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      addr  = 4'($urandom_range(0, 11));
      wdata = coef_t'($urandom);
      we_a  = 1'($urandom);
      we_s  = !we_a && 1'($urandom);
      if (we_a && addr < 10) exp_a[addr] = val(wdata);
      if (we_s && addr < 6)  exp_s[addr] = val(wdata);
      @(negedge clk);
      we_a = 1'b0; we_s = 1'b0;
      check_all();
    end
    // Reset restores the table.
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    exp_a = ta;
    exp_s = ts;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
