// position_decoder: (x,y) location of the hit pixel, shared by the whole array.
//
// `hits` holds one hit flag per pixel, pixel index i = y*NX + x. The decoder
// returns the column x and row y of the flagged pixel and `valid` when any flag
// is set. The hit gating normally lets only one pixel latch; if two latch in
// the same instant the lowest index wins. Purely combinational.
// Following the chip: a shared decoder producing the (x,y) location bits that
// lead the readout stream. Own choices: index order and the priority rule.
module position_decoder #(
  parameter int unsigned NX = apa_pkg::NX_DEF,
  parameter int unsigned NY = apa_pkg::NY_DEF,
  localparam int unsigned XW = apa_pkg::idx_w(NX),
  localparam int unsigned YW = apa_pkg::idx_w(NY)
) (
  input  logic [NX*NY-1:0] hits,
  output logic             valid,
  output logic [XW-1:0]    x,
  output logic [YW-1:0]    y
);

  always_comb begin
    valid = 1'b0;
    x     = '0;
    y     = '0;
    for (int i = NX*NY-1; i >= 0; i--) begin
      if (hits[i]) begin
        valid = 1'b1;
        x     = XW'(i % NX);
        y     = YW'(i / NX);
      end
    end
  end

endmodule
