// mixer_clkgen: behavioural model (not synthesisable logic) of the on-chip
// generator of the four mixer clocks of each custom-IC channel.
//
// The passive double-balanced mixer has four transmission-gate switches.
// One diagonal pair conducts while phi1 is high, the other while phi2 is
// high; phi1_n and phi2_n are the complements for the PMOS side of the
// gates. Both phases follow the external demodulation clock clk_in (phi1
// with clk_in high, phi2 with clk_in low), but each turns on only DEAD time
// units after the other has turned off, so the two pairs are never closed
// together: each phase is the AND of clk_in and a copy delayed by DEAD. In
// silicon the delay is a gate chain; here it is a simulation delay, which
// is why this model is not synthesisable.
//
// Interface: clk_in is the f_dm1 square wave from the FPGA; the outputs go
// to the mixer switches. DEAD must be shorter than half a clk_in period.
// That the four clocks are made on chip from the external clock and do not
// overlap is the IC's; the dead time and the output names are this model's.
module mixer_clkgen #(
  parameter int unsigned DEAD = 2   // dead time, simulation time units
) (
  input  logic clk_in,
  output logic phi1,
  output logic phi1_n,
  output logic phi2,
  output logic phi2_n
);

  // clk_in delayed by the dead time; each phase needs both the clock and
  // its delayed copy, so it turns off at once and turns on DEAD later
  logic clk_d;
  assign #(DEAD) clk_d = clk_in;

  assign phi1   = clk_in && clk_d;
  assign phi2   = !clk_in && !clk_d;
  assign phi1_n = !phi1;
  assign phi2_n = !phi2;

endmodule
