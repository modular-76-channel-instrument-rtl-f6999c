// crimson_top: digital part of the 76-channel broadband SRS lock-in
// platform: the FPGA firmware and the digital blocks of the ten custom ICs.
//
// Signal path. Each of the ten modules has an 8-channel custom IC whose
// analog mixer demodulates the photodiode signal at f_dm1 (square wave from
// the DDS), and a 16-channel 16-bit ADC. Per module, spi_adc_rx reads the
// ADC in the 40 MHz SPI clock domain and an async_fifo carries the words
// into the 64 MHz DSP domain. There ADC channels 0..7 (the AC outputs of
// IC channels 0..7) are routed to lanes module*8 + channel; the last
// module uses only four, giving 76 lanes. Each lane is a dsp_channel:
// digital demodulation by the DDS sine at f_mid (two-step mode) or bypass
// (direct mode), first-order IIR low-pass, integrate-and-dump over one
// f_mid period. The latest value of every ADC channel (the IC's DC outputs
// included, used for Raman normalisation) is also kept in `mon_sample`.
//
// Control. One dds makes f_m (to the optical modulator), f_dm1 (to the IC
// mixers, whose four non-overlapping switch clocks mixer_clkgen makes on
// each IC) and the f_mid sine. cfg_serializer loads the per-channel
// configuration shift registers of the ICs (asic_cfg_shiftreg).
//
// Outside this block: the analog front end, the ADC and DAC chips, the
// clock manager that makes the two clocks, and the USB link to the PC; the
// run-time settings arrive here as plain ports and results leave as ports.
//
// Timing: a sample reaches its lane about 5 DSP clocks after its last SPI
// bit; res_valid pulses once per gi_len samples of a lane.
// The structure follows the platform's block diagram; the lane mapping,
// the register interface and all widths are this design's.
module crimson_top
  import crimson_pkg::*;
#(
  parameter int unsigned CONV_CYCLES = 64,  // ADC conversion gap, SPI clocks
  parameter int unsigned FIFO_AW     = 4,   // log2 depth of each CDC FIFO
  parameter int unsigned CFG_BITS    = 8,   // configuration bits per IC channel
  parameter int unsigned CFG_DIV     = 4,   // config clock = clk_dsp / (2*CFG_DIV)
  parameter int unsigned MIX_DEAD    = 2    // mixer clock dead time (model)
) (
  input  logic                                        clk_spi,     // 40 MHz
  input  logic                                        clk_dsp,     // 64 MHz
  input  logic                                        rst_n,
  // acquisition settings
  input  logic                                        acq_enable,
  input  logic                                        two_step_en,
  input  logic [PHASE_BITS-1:0]                       ftw_m,
  input  logic [PHASE_BITS-1:0]                       ftw_dm1,
  input  logic                                        phase_clr,
  input  logic [COEF_BITS-1:0]                        lpf_coef,
  input  logic [GI_CNT_BITS-1:0]                      gi_len,
  input  logic                                        dsp_clr,
  // module ADCs
  output logic [N_MODULES-1:0]                        adc_cs_n,
  input  logic [N_MODULES-1:0]                        adc_sdo,
  // reference clocks
  output logic                                        mod_clk,     // f_m, optical modulator
  output logic                                        dm1_clk,     // f_dm1, IC mixers
  output logic [N_MODULES-1:0][3:0]                   mix_clk,     // {phi2_n, phi2, phi1_n, phi1} per IC
  // IC configuration
  input  logic                                        cfg_start,
  input  logic [N_MODULES-1:0][CH_PER_IC-1:0][CFG_BITS-1:0] cfg_words,
  output logic                                        cfg_busy,
  output logic                                        cfg_done,
  output logic [N_MODULES-1:0][CH_PER_IC-1:0][CFG_BITS-1:0] ic_cfg,
  // results
  output logic [N_LANES-1:0]                          lpf_valid,
  output logic signed [N_LANES-1:0][DEMOD_BITS-1:0]   lpf_y,
  output logic [N_LANES-1:0]                          res_valid,
  output logic signed [N_LANES-1:0][GI_BITS-1:0]     res,
  output logic signed [N_MODULES-1:0][ADC_CHANNELS-1:0][ADC_BITS-1:0] mon_sample,
  output logic [N_MODULES-1:0]                        cdc_overflow  // sticky, SPI clock domain
);

  logic rst_spi_n, rst_dsp_n;
  reset_sync u_rs_spi (.clk(clk_spi), .rst_n, .rst_n_sync(rst_spi_n));
  reset_sync u_rs_dsp (.clk(clk_dsp), .rst_n, .rst_n_sync(rst_dsp_n));

  // acq_enable comes from the DSP-side settings; bring it to the SPI clock
  logic [1:0] acq_en_sync;
  always_ff @(posedge clk_spi or negedge rst_spi_n) begin
    if (!rst_spi_n) acq_en_sync <= '0;
    else            acq_en_sync <= {acq_en_sync[0], acq_enable};
  end

  // ---------------- reference generation ----------------
  logic signed [SINE_BITS-1:0] sine;

  dds u_dds (
    .clk       (clk_dsp),
    .rst_n     (rst_dsp_n),
    .phase_clr,
    .ftw_m,
    .ftw_dm1,
    .sq_m      (mod_clk),
    .sq_dm1    (dm1_clk),
    .phase_mid (),
    .sine
  );

  // ---------------- IC configuration ----------------
  logic                 cfg_sclk, cfg_load;
  logic [N_MODULES-1:0] cfg_sdi;

  cfg_serializer #(
    .N_MOD(N_MODULES), .CH(CH_PER_IC), .CFG_BITS(CFG_BITS), .DIV(CFG_DIV)
  ) u_cfg (
    .clk       (clk_dsp),
    .rst_n     (rst_dsp_n),
    .start     (cfg_start),
    .cfg_words,
    .busy      (cfg_busy),
    .done      (cfg_done),
    .cfg_sclk,
    .cfg_sdi,
    .cfg_load
  );

  // ---------------- per-module acquisition ----------------
  logic [N_MODULES-1:0]                 lane_word_valid;
  adc_word_t [N_MODULES-1:0]            lane_word;

  for (genvar m = 0; m < N_MODULES; m++) begin : g_mod
    // digital parts of the module's custom IC
    logic cfg_sdo_unused;
    asic_cfg_shiftreg #(.CH(CH_PER_IC), .CFG_BITS(CFG_BITS)) u_ic_cfg (
      .cfg_sclk,
      .rst_n,
      .cfg_sdi  (cfg_sdi[m]),
      .cfg_load,
      .cfg_sdo  (cfg_sdo_unused),
      .cfg      (ic_cfg[m])
    );

    mixer_clkgen #(.DEAD(MIX_DEAD)) u_mix_clk (
      .clk_in (dm1_clk),
      .phi1   (mix_clk[m][0]),
      .phi1_n (mix_clk[m][1]),
      .phi2   (mix_clk[m][2]),
      .phi2_n (mix_clk[m][3])
    );

    // ADC readout in the SPI clock domain
    logic      w_valid, frame_done_unused, fifo_full;
    adc_word_t w_word;
    spi_adc_rx #(.CONV_CYCLES(CONV_CYCLES)) u_spi (
      .clk        (clk_spi),
      .rst_n      (rst_spi_n),
      .enable     (acq_en_sync[1]),
      .adc_cs_n   (adc_cs_n[m]),
      .adc_sdo    (adc_sdo[m]),
      .word_valid (w_valid),
      .word       (w_word),
      .frame_done (frame_done_unused)
    );

    // crossing to the DSP clock
    logic      fifo_empty;
    adc_word_t r_word;
    async_fifo #(.DW($bits(adc_word_t)), .AW(FIFO_AW)) u_cdc (
      .wclk   (clk_spi),
      .wrst_n (rst_spi_n),
      .wr_en  (w_valid),
      .wdata  (w_word),
      .full   (fifo_full),
      .rclk   (clk_dsp),
      .rrst_n (rst_dsp_n),
      .rd_en  (1'b1),
      .rdata  (r_word),
      .empty  (fifo_empty)
    );

    // a word offered to a full FIFO is lost; flag it until reset
    always_ff @(posedge clk_spi or negedge rst_spi_n) begin
      if (!rst_spi_n)                cdc_overflow[m] <= 1'b0;
      else if (w_valid && fifo_full) cdc_overflow[m] <= 1'b1;
    end

    // pop every word at once and keep it for the lanes and the monitor
    always_ff @(posedge clk_dsp or negedge rst_dsp_n) begin
      if (!rst_dsp_n) begin
        lane_word_valid[m] <= 1'b0;
        lane_word[m]       <= '0;
        mon_sample[m]      <= '0;
      end else begin
        lane_word_valid[m] <= !fifo_empty;
        if (!fifo_empty) begin
          lane_word[m]                   <= r_word;
          mon_sample[m][r_word.chan]     <= r_word.data;
        end
      end
    end
  end

  // ---------------- lock-in lanes ----------------
  for (genvar l = 0; l < N_LANES; l++) begin : g_lane
    localparam int unsigned M  = l / CH_PER_IC;
    localparam int unsigned CH = l % CH_PER_IC;
    logic x_valid;
    assign x_valid = lane_word_valid[M] && (lane_word[M].chan == 4'(CH));

    dsp_channel u_ch (
      .clk         (clk_dsp),
      .rst_n       (rst_dsp_n),
      .clr         (dsp_clr),
      .two_step_en,
      .lpf_coef,
      .gi_len,
      .sine,
      .x_valid,
      .x           (lane_word[M].data),
      .lpf_valid   (lpf_valid[l]),
      .lpf_y       (lpf_y[l]),
      .res_valid   (res_valid[l]),
      .res         (res[l])
    );
  end

endmodule
