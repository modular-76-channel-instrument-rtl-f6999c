// dds: direct digital synthesiser of the lock-in reference signals.
//
// Two 32-bit phase accumulators run on the 64 MHz DSP clock, stepped by the
// frequency tuning words ftw_m and ftw_dm1 (f = ftw * f_clk / 2^32):
//   * sq_m   - square wave at the modulation frequency f_m (to the optical
//              modulator), the MSB of the first accumulator;
//   * sq_dm1 - square wave at the first demodulation frequency f_dm1 (to the
//              mixer of the custom ICs), the MSB of the second;
//   * sine   - signed Q1.15 sine at f_dm2 = f_mid = f_dm1 - f_m for the
//              digital second demodulation.
// The sine phase is the difference of the two accumulators, so f_dm2
// equals f_dm1 - f_m exactly and stays locked to the two square waves.
// Its top 10 bits address a 256-entry quarter-wave table,
// tab[i] = round(32767 * sin((i + 0.5) * pi / 512)), computed at
// elaboration with an integer Taylor series. `sine` follows the phase by
// two clock cycles. `phase_clr` restarts both accumulators at zero.
//
// The three outputs, the 64 MHz clock and the relation f_dm2 = f_mid =
// f_dm1 - f_m are the platform's; the accumulator width, the table size and
// deriving the sine phase from the two accumulators are this design's.
module dds
  import crimson_pkg::*;
#(
  parameter int unsigned LUT_ABITS = 8   // quarter-wave table address bits
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         phase_clr,
  input  logic [PHASE_BITS-1:0]        ftw_m,
  input  logic [PHASE_BITS-1:0]        ftw_dm1,
  output logic                         sq_m,
  output logic                         sq_dm1,
  output logic [PHASE_BITS-1:0]        phase_mid,
  output logic signed [SINE_BITS-1:0]  sine
);

  localparam int unsigned N = 2**LUT_ABITS;
  typedef logic [N-1:0][SINE_BITS-1:0] qtab_t;

  // Quarter-wave sine table, sin(x) = x - x^3/3! + ... + x^9/9! in Q30
  function automatic qtab_t make_qtab();
    qtab_t  t;
    longint pi_q30, x, x2, term, sum;
    pi_q30 = 64'd3373259426;           // pi * 2^30
    for (int i = 0; i < int'(N); i++) begin
      x    = ((2 * i + 1) * pi_q30) / (4 * N);
      x2   = (x * x) >>> 30;
      term = x;
      sum  = x;
      for (int k = 1; k <= 4; k++) begin
        term = -(((term * x2) >>> 30) / ((2 * k) * (2 * k + 1)));
        sum  = sum + term;
      end
      t[i] = SINE_BITS'((sum * 32767 + (64'sd1 <<< 29)) >>> 30);
    end
    return t;
  endfunction

  localparam qtab_t QTAB = make_qtab();

  logic [PHASE_BITS-1:0] acc_m, acc_dm1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_m   <= '0;
      acc_dm1 <= '0;
    end else if (phase_clr) begin
      acc_m   <= '0;
      acc_dm1 <= '0;
    end else begin
      acc_m   <= acc_m + ftw_m;
      acc_dm1 <= acc_dm1 + ftw_dm1;
    end
  end

  assign sq_m      = acc_m[PHASE_BITS-1];
  assign sq_dm1    = acc_dm1[PHASE_BITS-1];
  assign phase_mid = acc_dm1 - acc_m;

  // stage 1: fold the phase into one quadrant and read the table
  logic [1:0]                quad;
  logic [LUT_ABITS-1:0]      idx;
  logic [SINE_BITS-1:0]      mag;
  logic                      neg;
  assign quad = phase_mid[PHASE_BITS-1 -: 2];
  assign idx  = phase_mid[PHASE_BITS-3 -: LUT_ABITS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag  <= '0;
      neg  <= 1'b0;
      sine <= '0;
    end else begin
      mag  <= QTAB[quad[0] ? ~idx : idx];
      neg  <= quad[1];
      // stage 2: apply the sign of the lower half period
      sine <= neg ? -$signed(mag) : $signed(mag);
    end
  end

endmodule
