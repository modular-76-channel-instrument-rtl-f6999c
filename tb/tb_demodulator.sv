// tb_demodulator: random samples and sine values in both modes; the output
// must be x*sine (two-step) or x*2^15 (direct), one clock after the input,
// and must hold between valid inputs.
module tb_demodulator;
  import crimson_pkg::*;

  logic clk = 0, rst_n = 1, two_step_en = 0, in_valid = 0, y_valid;
  logic signed [15:0] x = 0, sine = 0;
  logic signed [31:0] y, exp_y;
  int checks = 0, failures = 0, n_two = 0, n_direct = 0;

  always #5 clk = !clk;

  demodulator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      two_step_en = $urandom % 2;
      x           = 16'($urandom);
      sine        = 16'($urandom);
      if (n % 7 == 0) begin x = -16'sd32768; sine = -16'sd32767; end
      in_valid    = 1;
      exp_y = two_step_en ? 32'(longint'(x) * longint'(sine)) : 32'(longint'(x) * 32768);
      if (two_step_en) n_two++; else n_direct++;
      @(negedge clk);
      check(y_valid, "valid one clock later");
      check(y == exp_y, $sformatf("mode %0d x %0d s %0d: y %0d exp %0d", two_step_en, x, sine, y, exp_y));
      in_valid = 0;
      x = 16'($urandom);
      @(negedge clk);
      check(!y_valid && y == exp_y, "holds without valid");
    end
    check(n_two > 500 && n_direct > 500, "both modes used");
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
