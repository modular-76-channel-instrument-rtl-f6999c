// gated_integrator: discrete-time integrator with periodic notches at
// k * f_mid, the last stage of each lock-in lane.
//
// It sums `len` consecutive input samples and then dumps the sum and starts
// again (integrate and dump). The sum of len samples has zeros of its
// frequency response at every multiple of f_s / len; with len chosen as
// f_s / f_mid (one period of the intermediate frequency) the residues at
// f_mid and 2*f_mid left by the digital demodulation are removed. The
// output rate is f_s / len.
//
// Timing: the sum of samples 1..len appears on `sum` with `sum_valid` one
// clock after the len-th input sample. len = 0 is treated as 1.
// The notch behaviour is the platform's; integrate-and-dump as the way to
// get it, and the widths, are this design's.
module gated_integrator
  import crimson_pkg::*;
#(
  parameter int unsigned DW = DEMOD_BITS
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clr,
  input  logic [GI_CNT_BITS-1:0]            len,
  input  logic                              x_valid,
  input  logic signed [DW-1:0]              x,
  output logic                              sum_valid,
  output logic signed [DW+GI_CNT_BITS-1:0]  sum
);

  localparam int unsigned AW = DW + GI_CNT_BITS;

  logic signed [AW-1:0]    acc;
  logic [GI_CNT_BITS-1:0]  cnt;
  logic signed [AW-1:0]    acc_next;
  logic                    last;

  assign acc_next = acc + AW'(x);
  assign last     = (cnt + 1'b1 >= len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= 1'b0;
      if (clr) begin
        acc <= '0;
        cnt <= '0;
      end else if (x_valid) begin
        if (last) begin
          sum       <= acc_next;
          sum_valid <= 1'b1;
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= acc_next;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
