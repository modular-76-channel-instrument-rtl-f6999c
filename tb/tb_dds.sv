// tb_dds: checks the DDS against a model kept in the testbench: both square
// waves against the MSBs of independently accumulated phases, the sine
// phase as the difference of the two, the sine value against $sin within
// two LSBs (two clocks of latency), and the measured f_mid period.
module tb_dds;
  import crimson_pkg::*;

  logic clk = 0, rst_n = 1, phase_clr = 0;
  logic [31:0] ftw_m, ftw_dm1, phase_mid;
  logic sq_m, sq_dm1;
  logic signed [15:0] sine;
  int checks = 0, failures = 0, max_err = 0;
  logic [31:0] pm, pd;          // model phases
  logic [31:0] mid_hist [3];

  always #7.8125 clk = !clk;   // 64 MHz

  dds dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ref_sine(logic [31:0] ph);
    real a;
    // table point used by the DDS: centre of the addressed 1/1024 cell
    a = 2.0 * 3.14159265358979 * (real'(ph[31:22]) + 0.5) / 1024.0;
    return int'($floor(32767.0 * $sin(a) + 0.5));
  endfunction

  initial begin
    int e, rises, first_rise, last_rise;
    logic prev;
    // f_m = 1 MHz, f_dm1 = 1.0025 MHz -> f_mid = 2.5 kHz at 64 MHz
    ftw_m   = 32'd67108864;
    ftw_dm1 = 32'd67276636;
    #1 rst_n = 0;
    #50 rst_n = 1;
    @(negedge clk) phase_clr = 1;
    @(negedge clk) phase_clr = 0;
    pm = 0; pd = 0;
    for (int i = 0; i < 3; i++) mid_hist[i] = 0;
    for (int n = 0; n < 60000; n++) begin
      @(posedge clk); #1;
      pm += ftw_m; pd += ftw_dm1;
      check(sq_m == pm[31] && sq_dm1 == pd[31], "square waves");
      check(phase_mid == pd - pm, "phase_mid");
      mid_hist[2] = mid_hist[1]; mid_hist[1] = mid_hist[0]; mid_hist[0] = pd - pm;
      if (n >= 2) begin
        e = int'(sine) - ref_sine(mid_hist[2]);
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
        check(e <= 2, $sformatf("sine %0d exp %0d", sine, ref_sine(mid_hist[2])));
      end
    end
    // f_mid period: 64e6 / 2500 = 25600 clocks between rising zero crossings
    prev = (sine > 0); rises = 0; first_rise = 0; last_rise = 0;
    for (int n = 0; n < 80000; n++) begin
      @(posedge clk); #1;
      if (!prev && sine > 0) begin
        if (rises == 0) first_rise = n;
        last_rise = n;
        rises++;
      end
      prev = (sine > 0);
    end
    check(rises >= 3, "f_mid zero crossings");
    check((last_rise - first_rise) / (rises - 1) inside {[25590:25610]},
          $sformatf("f_mid period %0d", (last_rise - first_rise) / (rises - 1)));
    // phase clear
    @(negedge clk) phase_clr = 1;
    @(negedge clk) phase_clr = 0;
    check(phase_mid == 0, "phase restarts after clear");
    $display("max sine error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
