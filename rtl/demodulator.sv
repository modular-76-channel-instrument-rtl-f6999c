// demodulator: digital multiplier of the second lock-in demodulation, with
// the switch that bypasses it.
//
// In two-step mode (two_step_en = 1) the analog IC has already shifted the
// Raman signal to the intermediate frequency f_mid; this block multiplies
// each ADC sample by the DDS sine at f_dm2 = f_mid, which brings the signal
// back to DC and moves the IC's offset up to f_mid. In direct mode the IC
// demodulates straight to DC and the sample passes unchanged, scaled by
// 2^15 so that both modes share one output scale (a Q1.15 sine of
// amplitude one).
//
// Timing: y_valid follows in_valid by one clock; one signed multiplier.
// The multiplier and the switch in front of it are the platform's; the
// scaling of the bypass path is this design's.
module demodulator
  import crimson_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         two_step_en,
  input  logic                         in_valid,
  input  logic signed [ADC_BITS-1:0]   x,
  input  logic signed [SINE_BITS-1:0]  sine,
  output logic                         y_valid,
  output logic signed [DEMOD_BITS-1:0] y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        if (two_step_en) y <= x * sine;
        else             y <= DEMOD_BITS'(x) <<< (SINE_BITS - 1);
      end
    end
  end

endmodule
