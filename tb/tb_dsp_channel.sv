// tb_dsp_channel: one lock-in lane fed with an offset plus a tone at f_mid
// and the matching reference sine. The outputs are compared with a
// floating-point model of multiply -> IIR -> integrate-and-dump. In
// two-step mode the offset must vanish from the result and the tone must
// give N*A*32767/2; in direct mode a constant input must pass at 2^15
// gain. Also checks the two- and three-clock latencies of the stages.
module tb_dsp_channel;
  import crimson_pkg::*;
  localparam int N = 50;           // samples per f_mid period

  logic clk = 0, rst_n = 1, clr = 0, two_step_en = 0, x_valid = 0;
  logic [15:0] lpf_coef, gi_len;
  logic signed [15:0] sine = 0, x = 0;
  logic lpf_valid, res_valid;
  logic signed [31:0] lpf_y;
  logic signed [47:0] res;
  real a, ym, sm, last_res_model;
  int checks = 0, failures = 0, lat_lpf, lat_res, n_res = 0;
  real PI = 3.14159265358979;

  always #7.8125 clk = !clk;

  dsp_channel dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one sample; returns after the result would have appeared
  task automatic sample(int i, int off, int amp, bit two);
    int xs, ss;
    ss = int'($floor(32767.0 * $sin(2.0 * PI * i / N) + 0.5));
    xs = off + int'($floor(amp * $sin(2.0 * PI * i / N + 0.05) + 0.5));
    @(negedge clk);
    sine = 16'(ss); x = 16'(xs); x_valid = 1;
    ym = ym + a * ((two ? real'(xs) * real'(ss) : real'(xs) * 32768.0) - ym);
    sm = sm + ym;
    lat_lpf = 0; lat_res = 0;
    @(negedge clk);
    x_valid = 0;
    for (int c = 1; c <= 4; c++) begin
      if (lpf_valid) lat_lpf = c;
      if (res_valid) begin
        real d;
        lat_res = c;
        check(c == 3, $sformatf("res latency %0d", c));
        d = real'(res) - sm;
        if (d < 0) d = -d;
        check(d <= 4.0 * N, $sformatf("res %0d model %f", res, sm));
        last_res_model = sm;
        sm = 0;
        n_res++;
      end
      @(negedge clk);
    end
    check(lat_lpf == 2, $sformatf("lpf latency %0d", lat_lpf));
  endtask

  initial begin
    lpf_coef = 16'd32768; a = 0.5;
    gi_len = 16'(N);
    ym = 0; sm = 0;
    #1 rst_n = 0;
    #40 rst_n = 1;
    // two-step mode: offset only, after the filter settles the result ~ 0
    two_step_en = 1;
    for (int i = 0; i < 5 * N; i++) sample(i, 3000, 0, 1);
    check(res > -48'sd200000 && res < 48'sd200000,
          $sformatf("offset notched out: %0d", res));
    // two-step mode: offset plus tone of amplitude 2000
    for (int i = 0; i < 5 * N; i++) sample(i, 3000, 2000, 1);
    check(res > 48'(longint'(0.97 * N * 2000 * 32767 / 2)) &&
          res < 48'(longint'(1.01 * N * 2000 * 32767 / 2)),
          $sformatf("tone demodulated: %0d", res));
    // direct mode: constant input at 2^15 gain
    two_step_en = 0;
    for (int i = 0; i < 5 * N; i++) sample(i, -1234, 0, 0);
    check(res == 48'(longint'(N) * -1234 * 32768), $sformatf("direct: %0d", res));
    check(n_res == 15, $sformatf("results %0d", n_res));
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
