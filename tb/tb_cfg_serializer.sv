// tb_cfg_serializer: captures each module's serial line on the rising
// configuration clock in a testbench shift register and checks that the
// words arrive channel 7 first, MSB first, followed by one edge with
// cfg_load high, in (CH*CFG_BITS + 1) * 2*DIV system clocks.
module tb_cfg_serializer;
  localparam int unsigned N_MOD = 3, CH = 8, CFG_BITS = 8, DIV = 3;
  localparam int unsigned NB = CH * CFG_BITS;

  logic clk = 0, rst_n = 1, start = 0, busy, done, cfg_sclk, cfg_load;
  logic [N_MOD-1:0][CH-1:0][CFG_BITS-1:0] cfg_words;
  logic [N_MOD-1:0] cfg_sdi;
  logic [N_MOD-1:0][NB-1:0] cap;
  int checks = 0, failures = 0, shifts = 0, loads = 0;

  always #5 clk = !clk;

  cfg_serializer #(.N_MOD(N_MOD), .CH(CH), .CFG_BITS(CFG_BITS), .DIV(DIV)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge cfg_sclk) begin
    if (cfg_load) loads++;
    else begin
      for (int m = 0; m < int'(N_MOD); m++) cap[m] = {cap[m][NB-2:0], cfg_sdi[m]};
      shifts++;
    end
  end

  initial begin
    int t0, t1;
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      for (int m = 0; m < int'(N_MOD); m++)
        for (int c = 0; c < int'(CH); c++) cfg_words[m][c] = CFG_BITS'($urandom);
      shifts = 0; loads = 0;
      @(negedge clk) start = 1;
      t0 = $time;
      @(negedge clk) start = 0;
      check(busy, "busy after start");
      wait (done);
      t1 = $time;
      @(negedge clk);
      check(!busy && !cfg_sclk, "idle after done");
      check(shifts == NB && loads == 1, $sformatf("shifts %0d loads %0d", shifts, loads));
      for (int m = 0; m < int'(N_MOD); m++)
        check(cap[m] == NB'(cfg_words[m]), $sformatf("module %0d image %h exp %h", m, cap[m], cfg_words[m]));
      check((t1 - t0) / 10 == (NB + 1) * 2 * DIV,
            $sformatf("duration %0d clocks", (t1 - t0) / 10));
      repeat (5) @(negedge clk);
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
