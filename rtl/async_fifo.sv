// async_fifo: two-clock FIFO that carries ADC samples from the 40 MHz SPI
// clock domain to the 64 MHz DSP clock domain.
//
// The write and read pointers are kept in binary in their own domain and
// passed to the other domain in Gray code through two flip-flops, so only
// one bit of a crossing pointer changes at a time. Full is computed on the
// write side against the synchronised read pointer, empty on the read side
// against the synchronised write pointer; both are therefore pessimistic
// by the two-stage synchroniser delay, never wrong.
//
// Interface: a write happens on a wclk edge with `wr_en` high and `full`
// low; a read happens on an rclk edge with `rd_en` high and `empty` low.
// `rdata` shows the oldest word while `empty` is low (first-word
// fall-through). A written word is visible on the read side three rclk
// edges after the write edge at the latest.
//
// A two-clock FIFO synchroniser for this crossing is what the platform
// uses; the depth and the Gray-pointer construction are this design's.
module async_fifo #(
  parameter int unsigned DW = 20,   // word width
  parameter int unsigned AW = 4     // log2 of the depth
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,

  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty
);

  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write domain ----
  logic        do_write;
  logic [AW:0] wbin_next;
  assign do_write  = wr_en && !full;
  assign wbin_next = wbin + (AW+1)'(do_write);

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // full when the pointers differ only in the two top Gray bits
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // ---- read domain ----
  logic        do_read;
  logic [AW:0] rbin_next;
  assign do_read   = rd_en && !empty;
  assign rbin_next = rbin + (AW+1)'(do_read);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  // The flags guard the pointers, so a write while full is ignored and a
  // read while empty does nothing; a producer offering a word to a full
  // FIFO loses it, which this assertion reports.
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n)
                                  !(wr_en && full))
    else $error("async_fifo: write while full, word dropped");

endmodule
