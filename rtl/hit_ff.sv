// hit_ff: bypassable list-mode hit flip-flop of one pixel.
//
// In list mode each discriminator pulse of the pixel arrives on `disc`. Its
// rising edge sets the flip-flop, unless `gate` is high: `gate` is the global OR
// of all pixels' hit outputs, fed back so that once any pixel of the chip has
// latched a hit, no other pixel can latch one (no double hits) until the hit
// flip-flops are cleared. The flip-flop is clocked by the discriminator pulse
// itself, so a hit is captured within one gate delay with no system clock, as
// the nanosecond pulses require; `clr` clears it asynchronously.
// With `bypass` high the flip-flop is skipped and the raw discriminator pulse
// goes to `hit_out`, so the external TDC sees every pulse edge.
// Following the chip: the flip-flop, its bypass and the OR feedback gate.
// Own choices: the gate acts on the flip-flop's data input (a hit arriving while
// the gate is high is ignored), and clearing is an explicit asynchronous input.
module hit_ff (
  input  logic disc,     // discriminator pulse (list-mode path)
  input  logic clr,      // asynchronous clear, active high
  input  logic gate,     // global OR feedback: 1 blocks new hits
  input  logic bypass,   // 1: pass the discriminator pulse straight through
  output logic hit_q,    // latched hit
  output logic hit_out   // to the global OR tree and the position decoder
);

  always_ff @(posedge disc or posedge clr) begin
    if (clr)       hit_q <= 1'b0;
    else if (!gate) hit_q <= 1'b1;
  end

  assign hit_out = bypass ? disc : hit_q;

endmodule
