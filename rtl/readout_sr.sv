// readout_sr: one segment of the serial readout shift register chain.
//
// On a rising edge of `ro_clk` with `load` high the segment captures `pdata`
// (a pixel's counter, or the (x,y) location at the head of the chain); with
// `shift` high it moves one place towards `sdo`, taking `sdi` from the next
// segment. The MSB leaves first. Segments are chained sdo -> sdi so that the
// whole chip reads out as one bit stream; `load` takes priority over `shift`.
// Following the chip: a serial shift register chain with parallel load.
// Own choices: MSB-first order, the load/shift controls.
module readout_sr #(
  parameter int unsigned W = apa_pkg::CNT_W_DEF
) (
  input  logic         ro_clk,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] pdata,
  input  logic         sdi,
  output logic         sdo
);

  logic [W-1:0] sr;

  always_ff @(posedge ro_clk) begin
    if (load)       sr <= pdata;
    else if (shift) sr <= W'({sr, sdi});
  end

  assign sdo = sr[W-1];

endmodule
