// reset_sync: asynchronous-assert, synchronous-release reset for one clock
// domain. The output goes low at once with rst_n and goes high on the
// second clk edge after rst_n is released. Helper of this design.
module reset_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_n_sync
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {rst_n_sync, meta} <= 2'b00;
    else        {rst_n_sync, meta} <= {meta, 1'b1};
  end
endmodule
