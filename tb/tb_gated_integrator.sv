// tb_gated_integrator: random samples and lengths; each dumped sum must
// equal the sum of the last `len` inputs, one clock after the last one. A
// sine with exactly len samples per period (and its second harmonic) must
// integrate to nearly zero: the notches at k * f_s / len.
module tb_gated_integrator;
  import crimson_pkg::*;
  localparam int unsigned DW = 32;

  logic clk = 0, rst_n = 1, clr = 0, x_valid = 0, sum_valid;
  logic [15:0] len;
  logic signed [DW-1:0] x = 0;
  logic signed [DW+15:0] sum;
  longint acc;
  int checks = 0, failures = 0, dumps = 0;

  always #5 clk = !clk;

  gated_integrator #(.DW(DW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_block(int unsigned l, int kind);
    acc = 0;
    for (int i = 0; i < int'(l); i++) begin
      longint v;
      case (kind)
        0: v = longint'($signed(32'($urandom)));
        1: v = longint'($floor(1.0e9 * $sin(2.0 * 3.14159265358979 * i / l) + 0.5));
        default: v = longint'($floor(1.0e9 * $cos(4.0 * 3.14159265358979 * i / l) + 0.5));
      endcase
      @(negedge clk);
      x = DW'(v);
      x_valid = 1;
      acc += v;
      @(negedge clk);
      x_valid = 0;
      if (i < int'(l) - 1) check(!sum_valid, "no dump before len samples");
    end
    check(sum_valid, "dump after len samples");
    dumps++;
    if (kind == 0) check(sum == (DW+16)'(acc), $sformatf("sum %0d exp %0d", sum, acc));
    else check(sum < 64 && sum > -64, $sformatf("notch residue %0d", sum));
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      len = 16'(1 + $urandom % 300);
      run_block(len, 0);
    end
    len = 100;
    run_block(100, 1);
    run_block(100, 2);
    // clr discards a partial sum
    @(negedge clk) begin x = 32'sd12345; x_valid = 1; end
    @(negedge clk) begin x_valid = 0; clr = 1; end
    @(negedge clk) clr = 0;
    len = 3;
    run_block(3, 0);
    check(dumps == 43, "dump count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
