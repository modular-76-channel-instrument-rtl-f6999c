// cfg_serializer: FPGA side of the configuration link to the custom ICs.
//
// On `start` it loads one configuration image per module and shifts all
// N_MOD images out in parallel, one serial data line per module and a
// shared clock and load strobe. Each image is the CH channel words of one
// IC; it is sent channel CH-1 first, most significant bit first, so that
// after CH*CFG_BITS clock edges channel k's word sits in channel k's
// register of the IC (see asic_cfg_shiftreg). One more clock edge with
// cfg_load high then makes the new words active.
//
// Timing: cfg_sclk has a period of 2*DIV system clocks; cfg_sdi and
// cfg_load change while cfg_sclk is low, DIV clocks before its rising edge.
// A full load takes (CH*CFG_BITS + 1) * 2*DIV clocks; `busy` is high during
// it and `done` pulses at its end.
// The configuration path from the FPGA to every IC is the platform's; its
// protocol is this design's.
module cfg_serializer #(
  parameter int unsigned N_MOD    = 10,
  parameter int unsigned CH       = 8,
  parameter int unsigned CFG_BITS = 8,
  parameter int unsigned DIV      = 4
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  start,
  input  logic [N_MOD-1:0][CH-1:0][CFG_BITS-1:0] cfg_words,
  output logic                                  busy,
  output logic                                  done,
  output logic                                  cfg_sclk,
  output logic [N_MOD-1:0]                      cfg_sdi,
  output logic                                  cfg_load
);

  localparam int unsigned NB = CH * CFG_BITS;
  localparam int unsigned BW = $clog2(NB + 1);
  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [N_MOD-1:0][NB-1:0] shreg;
  logic [BW-1:0]            bit_cnt;   // bits sent so far
  logic [DW-1:0]            div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg    <= '0;
      bit_cnt  <= '0;
      div_cnt  <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      cfg_sclk <= 1'b0;
      cfg_sdi  <= '0;
      cfg_load <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          for (int m = 0; m < int'(N_MOD); m++) begin
            shreg[m]   <= cfg_words[m] << 1;
            cfg_sdi[m] <= cfg_words[m][CH-1][CFG_BITS-1];
          end
          bit_cnt  <= '0;
          div_cnt  <= '0;
          cfg_load <= 1'b0;
          busy     <= 1'b1;
        end
      end else if (div_cnt == DW'(DIV - 1)) begin
        div_cnt  <= '0;
        cfg_sclk <= !cfg_sclk;
        if (cfg_sclk) begin
          // falling edge: the bit just clocked in is gone, present the next
          if (cfg_load) begin
            cfg_load <= 1'b0;
            busy     <= 1'b0;
            done     <= 1'b1;
          end else if (bit_cnt == BW'(NB - 1)) begin
            cfg_load <= 1'b1;
            bit_cnt  <= bit_cnt + 1'b1;
          end else begin
            for (int m = 0; m < int'(N_MOD); m++) begin
              cfg_sdi[m] <= shreg[m][NB-1];
              shreg[m]   <= shreg[m] << 1;
            end
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

endmodule
