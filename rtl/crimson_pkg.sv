// crimson_pkg: sizes and types shared by the 76-channel lock-in firmware.
//
// The platform reads ten plug-in modules. Each module carries one 8-channel
// custom front-end IC and one 16-channel 16-bit ADC read over SPI. Of the 80
// IC channels, 76 are used (two 38-element photodiode arrays on the signal
// path). The numbers N_MODULES, CH_PER_IC, N_LANES, ADC_CHANNELS and
// ADC_BITS are the platform's; the data widths of the DSP chain and the
// channel-to-lane mapping are choices of this implementation.
package crimson_pkg;

  localparam int unsigned N_MODULES    = 10;  // 8-channel modules on the motherboard
  localparam int unsigned CH_PER_IC    = 8;   // channels of one custom IC
  localparam int unsigned N_LANES      = 76;  // lock-in channels of the platform
  localparam int unsigned ADC_CHANNELS = 16;  // channels of one module ADC
  localparam int unsigned ADC_BITS     = 16;  // ADC resolution

  // DSP chain widths (implementation choices)
  localparam int unsigned SINE_BITS    = 16;  // signed DDS sine amplitude, Q1.15
  localparam int unsigned PHASE_BITS   = 32;  // DDS phase accumulator width
  localparam int unsigned DEMOD_BITS   = ADC_BITS + SINE_BITS; // demodulator output
  localparam int unsigned COEF_BITS    = 16;  // LPF coefficient, unsigned Q0.16
  localparam int unsigned GI_CNT_BITS  = 16;  // integration length counter
  localparam int unsigned GI_BITS      = DEMOD_BITS + GI_CNT_BITS; // integrator sum

  // One ADC word as it crosses from the SPI clock to the DSP clock
  typedef struct packed {
    logic [3:0]                 chan;   // ADC channel 0..15
    logic signed [ADC_BITS-1:0] data;   // two's complement sample
  } adc_word_t;

  // Lane number of AC output `ch` of module `m`; lanes run module by module
  function automatic int unsigned lane_of(int unsigned m, int unsigned ch);
    return m * CH_PER_IC + ch;
  endfunction

endpackage
