// dsp_channel: one lock-in lane of the FPGA DSP chain (76 run in parallel).
//
// Chain: demodulator (second, digital demodulation by the DDS sine, or
// bypass in direct mode) -> first-order IIR low-pass filter (lock-in
// bandwidth) -> integrate-and-dump stage (notches at multiples of
// f_s / len, set to one period of f_mid). Each ADC sample of the lane
// enters with `x_valid`; the lane does its work in the cycles between
// samples, so one lane needs two multipliers and no memory.
//
// Timing: lpf_valid follows x_valid by two clocks; res_valid follows the
// len-th filtered sample by one clock (three clocks after its ADC sample).
// The order of the stages is the platform's; the widths are this design's.
module dsp_channel
  import crimson_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clr,          // restart filter and integrator
  input  logic                         two_step_en,  // 1: two-step, 0: direct
  input  logic [COEF_BITS-1:0]         lpf_coef,
  input  logic [GI_CNT_BITS-1:0]       gi_len,
  input  logic signed [SINE_BITS-1:0]  sine,
  input  logic                         x_valid,
  input  logic signed [ADC_BITS-1:0]   x,
  output logic                         lpf_valid,
  output logic signed [DEMOD_BITS-1:0] lpf_y,
  output logic                         res_valid,
  output logic signed [GI_BITS-1:0]    res
);

  logic                         dm_valid;
  logic signed [DEMOD_BITS-1:0] dm_y;

  demodulator u_demod (
    .clk, .rst_n, .two_step_en,
    .in_valid (x_valid),
    .x,
    .sine,
    .y_valid  (dm_valid),
    .y        (dm_y)
  );

  iir_lpf #(.DW(DEMOD_BITS)) u_lpf (
    .clk, .rst_n, .clr,
    .coef    (lpf_coef),
    .x_valid (dm_valid),
    .x       (dm_y),
    .y_valid (lpf_valid),
    .y       (lpf_y)
  );

  gated_integrator #(.DW(DEMOD_BITS)) u_gi (
    .clk, .rst_n, .clr,
    .len       (gi_len),
    .x_valid   (lpf_valid),
    .x         (lpf_y),
    .sum_valid (res_valid),
    .sum       (res)
  );

endmodule
