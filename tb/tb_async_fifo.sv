// tb_async_fifo: writes a random stream at 40 MHz and reads it at 64 MHz
// with random enables on both sides; checks order and content against a
// queue, that `full` rises after exactly 2^AW words with the reader
// stopped, that `empty` rises after draining, and the crossing latency.
module tb_async_fifo;
  localparam int unsigned DW = 20, AW = 4;

  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [$];
  int checks = 0, failures = 0, written = 0, readn = 0;
  bit  rd_random = 0, wr_random = 0;

  always #12.5   wclk = !wclk;   // 40 MHz
  always #7.8125 rclk = !rclk;   // 64 MHz

  async_fifo #(.DW(DW), .AW(AW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // writer
  always @(posedge wclk) begin
    if (wr_en && !full) begin
      model.push_back(wdata);
      written++;
    end
  end
  always @(negedge wclk) begin
    if (wr_random) begin
      wr_en <= ($urandom % 3) != 0 && !full;
      wdata <= DW'($urandom);
    end
  end

  // reader
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      if (model.size() == 0) check(0, "read with model empty");
      else begin
        logic [DW-1:0] e;
        e = model.pop_front();
        check(rdata == e, $sformatf("data %h exp %h", rdata, e));
      end
      readn++;
    end
  end
  always @(negedge rclk) if (rd_random) rd_en <= ($urandom % 2) != 0;

  initial begin
    int n, lat;
    #1 wrst_n = 0; rrst_n = 0;
    #100 wrst_n = 1; rrst_n = 1;
    repeat (2) @(posedge rclk);
    check(empty && !full, "empty after reset");
    // fill with the reader stopped
    n = 0;
    while (!full && n < 40) begin
      @(negedge wclk) begin wr_en = 1; wdata = DW'($urandom); end
      @(posedge wclk);
      n++;
      #1;
    end
    @(negedge wclk) wr_en = 0;
    check(written == 2**AW, $sformatf("full after %0d words", written));
    // drain
    @(negedge rclk) rd_en = 1;
    wait (model.size() == 0);
    repeat (6) @(posedge rclk);
    check(empty, "empty after drain");
    @(negedge rclk) rd_en = 0;
    // latency of one word
    @(negedge wclk) begin wr_en = 1; wdata = 20'h12345; end
    @(negedge wclk) wr_en = 0;
    lat = 0;
    while (empty && lat < 20) begin @(posedge rclk); #1 lat++; end
    check(lat <= 4, $sformatf("crossing latency %0d rclk", lat));
    @(negedge rclk) rd_en = 1;
    @(negedge rclk) rd_en = 0;
    // random traffic
    wr_random = 1; rd_random = 1;
    repeat (3000) @(posedge wclk);
    wr_random = 0;
    @(negedge wclk) wr_en = 0;
    rd_random = 0;
    @(negedge rclk) rd_en = 1;
    repeat (100) @(posedge rclk);
    check(model.size() == 0 && empty, "all words delivered");
    check(written > 1500, $sformatf("random traffic written %0d", written));
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
