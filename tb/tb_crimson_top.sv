// tb_crimson_top: end-to-end test of the whole platform at its default
// sizes: ten ADC models feed all 76 lanes.
//
// 1. The IC configuration is loaded and read back from every IC register.
// 2. Direct mode: each lane sees a constant; every integrator result must
//    be len * x * 2^15.
// 3. Two-step mode: each lane sees an offset plus a tone at f_mid, in phase
//    with the DDS sine; the offset must be notched out and the tone must
//    give len * A * 32767 / 2 (within a few percent for the phase lag of
//    the serial read-out).
// Throughout: the ADC channels 8..15 (DC outputs) must appear in the
// monitor, no CDC FIFO may overflow, and the reference clocks and the
// mixer clocks must toggle. Each mechanism is counted and must occur.
module tb_crimson_top;
  import crimson_pkg::*;

  localparam int    N      = 50;            // ADC samples per f_mid period
  localparam real   T_DSP  = 15.625;        // ns, 64 MHz
  localparam real   F_MID  = 2500.0;        // Hz
  localparam real   PI     = 3.14159265358979;
  localparam int unsigned FTW_M   = 32'd67108864;   // 1 MHz
  localparam int unsigned FTW_MID = 32'd167772;     // ~2.5 kHz

  logic clk_spi = 0, clk_dsp = 0, rst_n = 1;
  logic acq_enable = 0, two_step_en = 0, phase_clr = 0, dsp_clr = 0, cfg_start = 0;
  logic [31:0] ftw_m = FTW_M, ftw_dm1 = FTW_M;
  logic [15:0] lpf_coef = 16'd32768, gi_len = 16'(N);
  logic [N_MODULES-1:0] adc_cs_n, adc_sdo, cdc_overflow;
  logic mod_clk, dm1_clk, cfg_busy, cfg_done;
  logic [N_MODULES-1:0][3:0] mix_clk;
  logic [N_MODULES-1:0][CH_PER_IC-1:0][7:0] cfg_words, ic_cfg;
  logic [N_LANES-1:0] lpf_valid, res_valid;
  logic signed [N_LANES-1:0][31:0] lpf_y;
  logic signed [N_LANES-1:0][47:0] res;
  logic signed [N_MODULES-1:0][15:0][15:0] mon_sample;

  int  checks = 0, failures = 0;
  int  n_cfg = 0, n_direct = 0, n_two = 0, n_mon = 0, n_mix = 0, n_mod = 0, n_dm1 = 0;
  bit  tone_on = 0;
  realtime t_clr = 0;
  int  res_count [N_LANES];

  always #12.5 clk_spi = !clk_spi;       // 40 MHz
  always #(T_DSP / 2) clk_dsp = !clk_dsp; // 64 MHz

  crimson_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int offset_of(int l);  return 1000 + 37 * l - 40 * (l % 5) * l; endfunction
  function automatic int amp_of(int l);     return 200 + 20 * l; endfunction

  // ---- ADC models ----
  for (genvar m = 0; m < N_MODULES; m++) begin : g_adc
    logic [15:0][15:0] value;
    adc_spi_model u_adc (.sclk(clk_spi), .cs_n(adc_cs_n[m]), .value, .sdo(adc_sdo[m]));
    initial value = '0;
    always @(negedge adc_cs_n[m]) begin
      real ph;
      ph = 2.0 * PI * (real'(FTW_MID) * 64.0e6 / 4294967296.0) * ($realtime - t_clr) * 1.0e-9;
      for (int c = 0; c < 16; c++) begin
        int l, v;
        l = m * 8 + c;
        if (c < 8 && l < int'(N_LANES))
          v = offset_of(l) + (tone_on ? int'($floor(amp_of(l) * $sin(ph) + 0.5)) : 0);
        else
          v = 10000 + 100 * m + c;
        value[c] = 16'(v);
      end
    end
  end

  // ---- mechanism counters ----
  always @(posedge mix_clk[0][0]) n_mix++;
  always @(posedge mod_clk) n_mod++;
  always @(posedge dm1_clk) n_dm1++;
  always @(posedge clk_dsp) begin
    for (int l = 0; l < int'(N_LANES); l++) if (res_valid[l]) res_count[l]++;
    if (cdc_overflow != '0) begin
      failures++;
      $display("FAIL CDC overflow %b", cdc_overflow);
      $finish;
    end
  end

  task automatic wait_results(int k);
    for (int l = 0; l < int'(N_LANES); l++) res_count[l] = 0;
    // lanes of one module finish up to 16 ADC words apart
    wait (res_count[0] >= k && res_count[N_LANES-1] >= k);
    repeat (2 * ADC_CHANNELS * ADC_BITS) @(posedge clk_dsp);
    for (int l = 0; l < int'(N_LANES); l++)
      check(res_count[l] == k, $sformatf("lane %0d results %0d", l, res_count[l]));
  endtask

  initial begin
    #1 rst_n = 0;
    #100 rst_n = 1;
    repeat (4) @(posedge clk_dsp);

    // 1. configuration of the ten ICs
    for (int m = 0; m < int'(N_MODULES); m++)
      for (int c = 0; c < int'(CH_PER_IC); c++) cfg_words[m][c] = 8'($urandom);
    @(negedge clk_dsp) cfg_start = 1;
    @(negedge clk_dsp) cfg_start = 0;
    wait (cfg_done);
    repeat (2) @(posedge clk_dsp);
    check(ic_cfg == cfg_words, "IC registers hold the configuration");
    n_cfg++;

    // 2. direct demodulation
    @(negedge clk_dsp) acq_enable = 1;
    wait_results(4);
    for (int l = 0; l < int'(N_LANES); l++) begin
      check(res[l] == 48'(longint'(N) * offset_of(l) * 32768),
            $sformatf("direct lane %0d: %0d exp %0d", l, res[l], longint'(N) * offset_of(l) * 32768));
      n_direct++;
    end
    for (int m = 0; m < int'(N_MODULES); m++)
      for (int c = 8; c < 16; c++) begin
        check(mon_sample[m][c] == 16'(10000 + 100 * m + c), $sformatf("monitor %0d.%0d", m, c));
        n_mon++;
      end

    // 3. two-step demodulation: f_dm1 = f_m + f_mid
    @(negedge clk_dsp) begin
      ftw_dm1 = FTW_M + FTW_MID;
      two_step_en = 1;
      phase_clr = 1;
      dsp_clr = 1;
      tone_on = 1;
    end
    @(posedge clk_dsp) t_clr = $realtime;
    @(negedge clk_dsp) begin phase_clr = 0; dsp_clr = 0; end
    wait_results(4);
    for (int l = 0; l < int'(N_LANES); l++) begin
      real e;
      e = real'(N) * amp_of(l) * 32767.0 / 2.0;
      check(real'($signed(res[l])) > 0.97 * e && real'($signed(res[l])) < 1.01 * e,
            $sformatf("two-step lane %0d: %0d exp %f", l, res[l], e));
      n_two++;
    end
    // offset alone must vanish in two-step mode
    tone_on = 0;
    wait_results(3);
    for (int l = 0; l < int'(N_LANES); l++) begin
      real lim;
      lim = 0.01 * real'(N) * 1000.0 * 32767.0;
      check(real'($signed(res[l])) < lim && real'($signed(res[l])) > -lim,
            $sformatf("offset notched lane %0d: %0d", l, res[l]));
    end

    check(n_cfg > 0,    "mechanism: IC configuration load");
    check(n_direct > 0, "mechanism: direct demodulation");
    check(n_two > 0,    "mechanism: two-step demodulation");
    check(n_mon > 0,    "mechanism: DC monitor");
    check(n_mix > 0 && n_mod > 0 && n_dm1 > 0, "mechanism: reference and mixer clocks");
    $display("mechanisms: cfg=%0d direct=%0d two_step=%0d monitor=%0d mix_clk=%0d f_m=%0d f_dm1=%0d",
             n_cfg, n_direct, n_two, n_mon, n_mix, n_mod, n_dm1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
