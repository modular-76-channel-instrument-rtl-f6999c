// tb_spi_adc_rx: checks the SPI ADC reader against the ADC model: every
// channel's value and number, the word spacing of 16 SPI clocks and the
// frame period of CONV_CYCLES + 256 clocks.
module tb_spi_adc_rx;
  import crimson_pkg::*;
  localparam int unsigned CONV = 20;

  logic clk = 0, rst_n = 1, enable = 0;
  logic cs_n, sdo, word_valid, frame_done;
  adc_word_t word;
  logic [15:0][15:0] value, expect_frame;
  int checks = 0, failures = 0, frames = 0, words = 0;
  longint cyc = 0, last_word_cyc = -1, last_frame_cyc = -1;

  always #12.5 clk = !clk;   // 40 MHz
  always @(posedge clk) cyc++;

  spi_adc_rx #(.CONV_CYCLES(CONV)) dut (
    .clk, .rst_n, .enable, .adc_cs_n(cs_n), .adc_sdo(sdo),
    .word_valid, .word, .frame_done);
  adc_spi_model adc (.sclk(clk), .cs_n, .value, .sdo);

  // new random frame each time chip select falls
  always @(negedge cs_n) begin
    for (int ch = 0; ch < 16; ch++) value[ch] = 16'($urandom);
    expect_frame = value;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (word_valid) begin
      check(word.chan == 4'(words % 16), $sformatf("chan %0d", word.chan));
      check(word.data == expect_frame[words % 16],
            $sformatf("data ch%0d %h exp %h", word.chan, word.data, expect_frame[words % 16]));
      if (last_word_cyc >= 0 && (words % 16) != 0)
        check(cyc - last_word_cyc == 16, "word spacing");
      last_word_cyc = cyc;
      words++;
    end
    if (frame_done) begin
      check(words % 16 == 0, "frame_done with last word");
      if (last_frame_cyc >= 0)
        check(cyc - last_frame_cyc == CONV + 256,
              $sformatf("frame period %0d", cyc - last_frame_cyc));
      last_frame_cyc = cyc;
      frames++;
    end
  end

  initial begin
    value = '0;
    expect_frame = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(cs_n == 1'b1, "cs_n idle high");
    @(negedge clk) enable = 1;
    wait (frames == 5);
    @(negedge clk) enable = 0;
    repeat (400) @(posedge clk);
    check(cs_n == 1'b1, "stopped after disable");
    check(frames == 5, "no frame after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
