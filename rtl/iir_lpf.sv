// iir_lpf: first-order IIR low-pass filter that sets the lock-in bandwidth.
//
// Per input sample: y[n] = y[n-1] + a * (x[n] - y[n-1]), with the
// coefficient a = coef / 2^16 (0 < a < 1) set at run time. One multiplier
// does the work. The state keeps COEF_BITS fractional bits below the output
// so that small steps are not lost. The -3 dB bandwidth is about
// a * f_s / (2*pi) for small a, f_s being the sample rate.
//
// Timing: y_valid follows x_valid by one clock; y is the new state rounded
// down to the input scale. Between valid samples the state holds.
// A first-order IIR with a single multiplier and adjustable bandwidth is
// the platform's; the coefficient format and widths are this design's.
module iir_lpf
  import crimson_pkg::*;
#(
  parameter int unsigned DW = DEMOD_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,       // restart from zero
  input  logic [COEF_BITS-1:0]  coef,      // a in Q0.16
  input  logic                  x_valid,
  input  logic signed [DW-1:0]  x,
  output logic                  y_valid,
  output logic signed [DW-1:0]  y
);

  localparam int unsigned SW = DW + COEF_BITS;        // state width
  localparam int unsigned PW = DW + 1 + COEF_BITS + 1; // product width

  logic signed [SW-1:0] state;
  logic signed [DW:0]   err;
  logic signed [PW-1:0] prod;

  assign err  = (DW+1)'(x) - (DW+1)'(state >>> COEF_BITS);
  assign prod = err * $signed({1'b0, coef});
  assign y    = DW'(state >>> COEF_BITS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid && !clr;
      if (clr)          state <= '0;
      else if (x_valid) state <= SW'(PW'(state) + prod);
    end
  end

endmodule
