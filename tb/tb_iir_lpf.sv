// tb_iir_lpf: drives the filter with steps and random samples and compares
// each output with a floating-point model of y += a*(x - y), within a few
// LSBs. Also checks the step response reaches 1 - 1/e after about 1/a
// samples, that clr restarts it, and that the state holds between samples.
module tb_iir_lpf;
  import crimson_pkg::*;
  localparam int unsigned DW = 32;

  logic clk = 0, rst_n = 1, clr = 0, x_valid = 0, y_valid;
  logic [15:0] coef;
  logic signed [DW-1:0] x = 0, y;
  real ym, a;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  iir_lpf #(.DW(DW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic push(longint v);
    real d;
    @(negedge clk);
    x = DW'(v);
    x_valid = 1;
    ym = ym + a * (real'(v) - ym);
    @(negedge clk);
    x_valid = 0;
    check(y_valid, "valid");
    d = real'(y) - ym;
    if (d < 0) d = -d;
    check(d <= 4.0, $sformatf("y %0d model %f", y, ym));
  endtask

  initial begin
    int n63;
    coef = 16'd4096;              // a = 1/16
    a = 4096.0 / 65536.0;
    ym = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    // step response
    n63 = -1;
    for (int n = 0; n < 200; n++) begin
      push(1000000);
      if (n63 < 0 && y >= 632120) n63 = n + 1;
    end
    check(n63 >= 15 && n63 <= 17, $sformatf("time constant %0d samples", n63));
    check(y >= 999990 && y <= 1000000, $sformatf("settled %0d", y));
    // hold between samples
    repeat (10) @(negedge clk);
    check(y >= 999990 && y <= 1000000 && !y_valid, "holds");
    // clear
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    ym = 0;
    check(y == 0, "cleared");
    // random input, other coefficient
    coef = 16'd30000;
    a = 30000.0 / 65536.0;
    for (int n = 0; n < 2000; n++) push(longint'($signed(32'($urandom))) / 4);
    // negative step
    coef = 16'd655;
    a = 655.0 / 65536.0;
    for (int n = 0; n < 1500; n++) push(-2000000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
