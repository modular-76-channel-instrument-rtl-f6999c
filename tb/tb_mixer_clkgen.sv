// tb_mixer_clkgen: drives the mixer clock model with a square wave of
// changing period and samples the outputs every 0.1 time unit: the two
// phases must never be high together, each must turn on DEAD after the
// clock edge and off with it, and the _n outputs must be complements.
module tb_mixer_clkgen;
  localparam int unsigned DEAD = 2;

  logic clk_in = 0, phi1, phi1_n, phi2, phi2_n;
  int checks = 0, failures = 0, on1 = 0, on2 = 0;
  realtime t_edge;

  mixer_clkgen #(.DEAD(DEAD)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge phi1) begin
    on1++;
    check($realtime - t_edge > DEAD - 0.05 && $realtime - t_edge < DEAD + 0.05, "phi1 dead time");
  end
  always @(posedge phi2) begin
    on2++;
    check($realtime - t_edge > DEAD - 0.05 && $realtime - t_edge < DEAD + 0.05, "phi2 dead time");
  end

  initial begin
    forever begin
      #0.1;
      check(!(phi1 && phi2), "phases overlap");
      check(phi1_n == !phi1 && phi2_n == !phi2, "complements");
    end
  end

  initial begin
    t_edge = 0;
    #20;
    on1 = 0; on2 = 0;
    for (int n = 0; n < 200; n++) begin
      int half;
      half = 5 + (n % 7);
      clk_in = 1; t_edge = $realtime;
      #1 check(!phi1 && !phi2, "both off in dead time after rise");
      #(half - 1);
      check(phi1, "phi1 on with clock high");
      clk_in = 0; t_edge = $realtime;
      #1 check(!phi1 && !phi2, "both off in dead time after fall");
      #(half - 1);
      check(phi2, "phi2 on with clock low");
    end
    check(on1 == 200 && on2 == 200, $sformatf("pulses %0d %0d", on1, on2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
