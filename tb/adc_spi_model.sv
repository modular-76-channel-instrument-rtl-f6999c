// adc_spi_model: behavioural model of a module's 16-channel 16-bit SPI ADC,
// for testbenches only.
//
// While cs_n is low the model drives one bit of the frame on sdo after every
// falling sclk edge: channel 0 first, MSB first, 16 channels of 16 bits.
// The frame is taken from `value` at the first falling edge after cs_n goes
// low, so a testbench may change `value` when cs_n falls.
module adc_spi_model (
  input  logic              sclk,
  input  logic              cs_n,
  input  logic [15:0][15:0] value,   // value[ch], two's complement
  output logic              sdo
);
  logic [255:0] frame;
  int           idx = 0;

  initial sdo = 1'b0;

  always @(negedge sclk) begin
    if (cs_n) begin
      idx = 0;
    end else begin
      if (idx == 0) begin
        for (int ch = 0; ch < 16; ch++) frame[255 - 16*ch -: 16] = value[ch];
      end
      if (idx < 256) sdo <= frame[255 - idx];
      idx++;
    end
  end
endmodule
