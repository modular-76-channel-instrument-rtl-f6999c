// asic_cfg_shiftreg: configuration shift register of the 8-channel custom
// front-end IC, one CFG_BITS-bit register per channel.
//
// The IC's channel registers form one serial chain clocked by cfg_sclk.
// On each rising edge with cfg_load low, cfg_sdi enters the least
// significant bit of channel 0 and every bit moves one place towards the
// most significant bit of channel CH-1, whose bit leaves on cfg_sdo (for
// read-back or daisy-chaining). On a rising edge with cfg_load high the
// chain is copied into the channel registers `cfg` that drive the analog
// channel, so the analog settings change only once, after a full load.
// A load is therefore CH*CFG_BITS shift edges, channel CH-1 first and MSB
// first, followed by one edge with cfg_load high. rst_n clears all.
//
// The IC has eight channels and a shift register for every channel; the
// register width, the load strobe and the bit order are this design's,
// because the meaning of the configuration bits is not published.
module asic_cfg_shiftreg #(
  parameter int unsigned CH       = 8,
  parameter int unsigned CFG_BITS = 8
) (
  input  logic                             cfg_sclk,
  input  logic                             rst_n,
  input  logic                             cfg_sdi,
  input  logic                             cfg_load,
  output logic                             cfg_sdo,
  output logic [CH-1:0][CFG_BITS-1:0]      cfg
);

  logic [CH*CFG_BITS-1:0] chain;   // channel k at bits k*CFG_BITS+:CFG_BITS

  always_ff @(posedge cfg_sclk or negedge rst_n) begin
    if (!rst_n) begin
      chain <= '0;
      cfg   <= '0;
    end else if (cfg_load) begin
      cfg   <= chain;
    end else begin
      chain <= {chain[CH*CFG_BITS-2:0], cfg_sdi};
    end
  end

  assign cfg_sdo = chain[CH*CFG_BITS-1];

endmodule
