// config_register: serially loaded configuration register, one link of the
// configuration chain.
//
// On a rising edge of `cfg_clk` with `en` high the register shifts one place
// towards `sdo` (MSB side), taking `sdi` into bit 0; `q` drives the settings
// directly. Chained registers are loaded by shifting in the bits of the last
// register first. `rst_n` clears the register asynchronously.
// The chip has per-pixel trim values and global settings (threshold, gain,
// polarity, mode); how they reach the chip is this design's choice: one serial
// chain, without shadow latches, so settings change while they are shifted.
module config_register #(
  parameter int unsigned W = apa_pkg::TRIM_W
) (
  input  logic         cfg_clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sdi,
  output logic         sdo,
  output logic [W-1:0] q
);

  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= W'({q, sdi});
  end

  assign sdo = q[W-1];

endmodule
