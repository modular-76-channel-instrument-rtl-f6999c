// spi_adc_rx: SPI master that reads one module's 16-channel 16-bit ADC.
//
// Each module digitises its IC outputs with a 16-channel 16-bit ADC that
// sends its data to the FPGA over SPI, clocked by the 40 MHz SPI clock. This
// block runs in that clock domain; the SPI clock pin is the block's own
// clock forwarded to the ADC, so one SDO bit arrives per cycle.
//
// Frame: while `enable` is high the block holds CS_n high for CONV_CYCLES
// cycles (conversion time of the ADC), then pulls it low for
// ADC_CHANNELS*ADC_BITS cycles and shifts in all channels, channel 0 first,
// MSB first. The ADC puts a bit on SDO half a cycle after CS_n falls and on
// every falling SCLK edge after it; this block samples SDO on rising edges.
// After the 16th bit of a channel, `word_valid` pulses for one cycle with
// the channel number and the two's complement sample.
// Sample rate per channel: f_clk / (CONV_CYCLES + ADC_CHANNELS*ADC_BITS),
// 125 kS/s at 40 MHz with the defaults.
//
// The 40 MHz SPI clock, 16 channels and 16 bits are the platform's. The
// frame layout, the conversion gap and the data format are choices of this
// design: the ADC part number is not known.
module spi_adc_rx
  import crimson_pkg::*;
#(
  parameter int unsigned CONV_CYCLES = 64
) (
  input  logic      clk,        // SPI clock domain (40 MHz), also SCLK
  input  logic      rst_n,
  input  logic      enable,     // run continuous acquisition
  output logic      adc_cs_n,   // ADC chip select, active low
  input  logic      adc_sdo,    // ADC serial data out
  output logic      word_valid, // one sample ready
  output adc_word_t word,       // channel number and sample
  output logic      frame_done  // pulses with the last channel of a frame
);

  localparam int unsigned FRAME_BITS = ADC_CHANNELS * ADC_BITS;
  localparam int unsigned BW         = $clog2(FRAME_BITS);
  localparam int unsigned CW         = (CONV_CYCLES > 1) ? $clog2(CONV_CYCLES) : 1;

  typedef enum logic [0:0] {S_CONV, S_SHIFT} state_t;
  state_t              state;
  logic [CW-1:0]       conv_cnt;
  logic [BW-1:0]       bit_cnt;
  logic [ADC_BITS-2:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_CONV;
      conv_cnt   <= '0;
      bit_cnt    <= '0;
      shreg      <= '0;
      adc_cs_n   <= 1'b1;
      word_valid <= 1'b0;
      word       <= '0;
      frame_done <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      frame_done <= 1'b0;
      unique case (state)
        S_CONV: begin
          if (!enable) begin
            conv_cnt <= '0;
          end else if (conv_cnt == CW'(CONV_CYCLES - 1)) begin
            conv_cnt <= '0;
            bit_cnt  <= '0;
            adc_cs_n <= 1'b0;
            state    <= S_SHIFT;
          end else begin
            conv_cnt <= conv_cnt + 1'b1;
          end
        end
        S_SHIFT: begin
          shreg   <= {shreg[ADC_BITS-3:0], adc_sdo};
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt[$clog2(ADC_BITS)-1:0] == '1) begin
            word_valid <= 1'b1;
            word.chan  <= bit_cnt[BW-1 -: 4];
            word.data  <= {shreg, adc_sdo};
          end
          if (bit_cnt == BW'(FRAME_BITS - 1)) begin
            adc_cs_n   <= 1'b1;
            frame_done <= 1'b1;
            state      <= S_CONV;
          end
        end
        default: state <= S_CONV;
      endcase
    end
  end

endmodule
