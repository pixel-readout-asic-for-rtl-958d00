// counter_pair: the two hit counters of one pixel, for dead-time-free counting.
//
// Every rising edge of `hit` increments the counter picked by `sel`
// (0: counter 0, 1: counter 1); the other counter holds its value and can be
// read out, through `idle_cnt`, while counting goes on in the selected one.
// Switching `sel` swaps the roles, so no hit is lost while a frame is read out.
// The counters are clocked by the discriminator pulses themselves (no system
// clock). `clr_idle` clears the counter that is not selected, asynchronously,
// after it has been read; `rst` clears both. Counters wrap at 2**CNT_W.
// Following the chip: two independently usable counters of 32 bits, remote
// selection. Own choices: the clear inputs, wrap-around on overflow.
module counter_pair #(
  parameter int unsigned CNT_W = apa_pkg::CNT_W_DEF
) (
  input  logic             hit,       // counting-mode discriminator pulse
  input  logic             sel,       // counter that counts: 0 or 1
  input  logic             clr_idle,  // clear the counter not selected
  input  logic             rst,       // clear both counters
  output logic [CNT_W-1:0] cnt0,
  output logic [CNT_W-1:0] cnt1,
  output logic [CNT_W-1:0] idle_cnt   // the counter not selected, for readout
);

  logic clr0, clr1;
  assign clr0 = rst | (clr_idle & sel);
  assign clr1 = rst | (clr_idle & ~sel);

  always_ff @(posedge hit or posedge clr0) begin
    if (clr0)      cnt0 <= '0;
    else if (!sel) cnt0 <= cnt0 + 1'b1;
  end

  always_ff @(posedge hit or posedge clr1) begin
    if (clr1)     cnt1 <= '0;
    else if (sel) cnt1 <= cnt1 + 1'b1;
  end

  assign idle_cnt = sel ? cnt0 : cnt1;

endmodule
