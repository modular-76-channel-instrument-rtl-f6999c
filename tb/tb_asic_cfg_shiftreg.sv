// tb_asic_cfg_shiftreg: shifts random images into the IC's register chain
// and checks that channel registers change only on the load edge, that
// each channel gets its word, and that the chain's output returns the
// previous image bit by bit.
module tb_asic_cfg_shiftreg;
  localparam int unsigned CH = 8, CFG_BITS = 8, NB = CH * CFG_BITS;

  logic cfg_sclk = 0, rst_n = 1, cfg_sdi = 0, cfg_load = 0, cfg_sdo;
  logic [CH-1:0][CFG_BITS-1:0] cfg, img, prev_img, held;
  logic [NB-1:0] out_bits;
  int checks = 0, failures = 0;

  asic_cfg_shiftreg #(.CH(CH), .CFG_BITS(CFG_BITS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse();
    #10 cfg_sclk = 1;
    #10 cfg_sclk = 0;
  endtask

  initial begin
    #1 rst_n = 0;
    #5 rst_n = 1;
    check(cfg == '0, "reset clears");
    prev_img = '0;
    for (int r = 0; r < 6; r++) begin
      for (int c = 0; c < int'(CH); c++) img[c] = CFG_BITS'($urandom);
      held = cfg;
      for (int b = NB - 1; b >= 0; b--) begin
        cfg_sdi = img[b / CFG_BITS][b % CFG_BITS];
        out_bits[b] = cfg_sdo;        // previous image leaves MSB first
        pulse();
      end
      check(cfg == held, "no change before the load edge");
      check(out_bits == NB'(prev_img), "chain output is the previous image");
      cfg_load = 1;
      pulse();
      cfg_load = 0;
      for (int c = 0; c < int'(CH); c++)
        check(cfg[c] == img[c], $sformatf("channel %0d %h exp %h", c, cfg[c], img[c]));
      prev_img = img;
    end
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
