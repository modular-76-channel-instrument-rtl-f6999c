// tb_offset_drift: bench test of offset-drift rejection on the whole
// platform at its default sizes.
//
// A Raman line of 328 ADC LSB (25 mV on an assumed +-2.5 V ADC range) sits
// on an analog offset that drifts linearly by 40 LSB in 3.2 ms (the slow
// mV-level drift of the analog chain, sped up so it can be simulated).
//  * Direct mode: the analog mixer delivers line + drift at DC. The results
//    follow the drift.
//  * Two-step mode: the analog mixer delivers the line at f_mid and the
//    drift at DC. The digital demodulation moves the drift to f_mid, where
//    the integrator's notch removes it, so the results stay flat.
// Eight consecutive results of lane 0 (all lanes get the same input) are
// compared: normalised to LSB, the two-step spread must be under a fifth
// of the direct spread and its mean within 8 LSB of the line.
module tb_offset_drift;
  import crimson_pkg::*;

  localparam int    N       = 50;
  localparam real   PI      = 3.14159265358979;
  localparam real   LINE    = 328.0;
  localparam real   SLOPE   = 40.0 / 3.2e6;   // LSB per ns
  localparam int unsigned FTW_M   = 32'd67108864;
  localparam int unsigned FTW_MID = 32'd167772;

  logic clk_spi = 0, clk_dsp = 0, rst_n = 1;
  logic acq_enable = 0, two_step_en = 0, phase_clr = 0, dsp_clr = 0, cfg_start = 0;
  logic [31:0] ftw_m = FTW_M, ftw_dm1 = FTW_M;
  logic [15:0] lpf_coef = 16'd32768, gi_len = 16'(N);
  logic [N_MODULES-1:0] adc_cs_n, adc_sdo, cdc_overflow;
  logic mod_clk, dm1_clk, cfg_busy, cfg_done;
  logic [N_MODULES-1:0][3:0] mix_clk;
  logic [N_MODULES-1:0][CH_PER_IC-1:0][7:0] cfg_words = '0, ic_cfg;
  logic [N_LANES-1:0] lpf_valid, res_valid;
  logic signed [N_LANES-1:0][31:0] lpf_y;
  logic signed [N_LANES-1:0][47:0] res;
  logic signed [N_MODULES-1:0][15:0][15:0] mon_sample;

  int  checks = 0, failures = 0;
  bit  two_step_in = 0;
  realtime t_clr = 0, t_drift0 = 0;
  real results [$];

  always #12.5 clk_spi = !clk_spi;
  always #7.8125 clk_dsp = !clk_dsp;

  crimson_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar m = 0; m < N_MODULES; m++) begin : g_adc
    logic [15:0][15:0] value;
    adc_spi_model u_adc (.sclk(clk_spi), .cs_n(adc_cs_n[m]), .value, .sdo(adc_sdo[m]));
    initial value = '0;
    always @(negedge adc_cs_n[m]) begin
      real ph, drift, v;
      ph    = 2.0 * PI * (real'(FTW_MID) * 64.0e6 / 4294967296.0) * ($realtime - t_clr) * 1.0e-9;
      drift = SLOPE * ($realtime - t_drift0);
      v     = two_step_in ? drift + LINE * $sin(ph) : drift + LINE;
      for (int c = 0; c < 16; c++) value[c] = 16'(int'($floor(v + 0.5)));
    end
  end

  // collect normalised results of lane 0
  real scale = 1.0;
  bit  collect = 0;
  always @(posedge clk_dsp)
    if (collect && res_valid[0]) results.push_back(real'($signed(res[0])) / scale);

  task automatic measure(output real mean, output real spread);
    real lo, hi, sum;
    results.delete();
    // let the filter settle for two results, then keep eight
    collect = 1;
    wait (results.size() == 10);
    collect = 0;
    lo = 1.0e30; hi = -1.0e30; sum = 0;
    for (int i = 2; i < 10; i++) begin
      if (results[i] < lo) lo = results[i];
      if (results[i] > hi) hi = results[i];
      sum += results[i];
    end
    mean = sum / 8.0;
    spread = hi - lo;
  endtask

  initial begin
    real m_dir, s_dir, m_two, s_two;
    #1 rst_n = 0;
    #100 rst_n = 1;
    repeat (4) @(posedge clk_dsp);

    // direct demodulation
    scale = real'(N) * 32768.0;
    t_drift0 = $realtime;
    @(negedge clk_dsp) acq_enable = 1;
    measure(m_dir, s_dir);

    // two-step down-conversion, same drift rate
    @(negedge clk_dsp) begin
      ftw_dm1 = FTW_M + FTW_MID;
      two_step_en = 1;
      phase_clr = 1;
      dsp_clr = 1;
    end
    @(posedge clk_dsp) begin t_clr = $realtime; t_drift0 = $realtime; two_step_in = 1; end
    @(negedge clk_dsp) begin phase_clr = 0; dsp_clr = 0; end
    scale = real'(N) * 32767.0 / 2.0;
    measure(m_two, s_two);

    $display("direct:   mean %f LSB, spread over 8 results %f LSB", m_dir, s_dir);
    $display("two-step: mean %f LSB, spread over 8 results %f LSB", m_two, s_two);
    check(s_dir > 20.0, "direct mode follows the drift");
    check(s_two < 0.2 * s_dir, "two-step mode rejects the drift");
    check(m_two > LINE - 8.0 && m_two < LINE + 8.0, "two-step mode keeps the line amplitude");
    check(cdc_overflow == '0, "no CDC overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
