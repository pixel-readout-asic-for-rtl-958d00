// pixel_logic: digital part of one pixel.
//
// The discriminator pulse `disc` is steered by the global mode: in list mode it
// goes to the bypassable hit flip-flop (hit_ff), whose output `hit_out` feeds
// the chip's global OR tree and position decoder; in counting mode it clocks
// the pair of counters (counter_pair), one counting while the other is read.
// The pixel also holds its own threshold trim (a link of the configuration
// chain) and its own segment of the readout chain, which on `ro_load` captures
// the counter that is not counting.
// Timing: hit flip-flop and counters are clocked by the discriminator pulse,
// the readout segment by `ro_clk`, the trim register by `cfg_clk`. Loading the
// idle counter is safe because that counter receives no clock edges.
// Following the chip: mode steering, hit flip-flop, two 32-bit counters,
// per-pixel trim. Own choices: what the readout segment holds (only the idle
// counter) and the serial trim register. The two counter values and the
// latched-hit output of the sub-blocks are left unused here on purpose: only
// the idle counter and the (possibly bypassed) hit output leave the pixel.
module pixel_logic #(
  parameter int unsigned CNT_W  = apa_pkg::CNT_W_DEF,
  parameter int unsigned TRIM_W = apa_pkg::TRIM_W
) (
  // front-end
  input  logic              disc,        // discriminator output
  output logic [TRIM_W-1:0] trim,        // threshold trim code to the front-end
  // global controls
  input  logic              list_mode,   // 1: list mode, 0: counting mode
  input  logic              hit_bypass,  // bypass the hit flip-flop
  input  logic              gate,        // global OR feedback
  input  logic              hit_clr,     // clear the hit flip-flop
  input  logic              cnt_sel,     // counter that counts
  input  logic              cnt_clr,     // clear the idle counter
  input  logic              rst,         // clear hit flip-flop and both counters
  output logic              hit_out,     // to OR tree / position decoder
  // configuration chain
  input  logic              cfg_clk,
  input  logic              cfg_rst_n,
  input  logic              cfg_en,
  input  logic              cfg_sdi,
  output logic              cfg_sdo,
  // readout chain
  input  logic              ro_clk,
  input  logic              ro_load,
  input  logic              ro_shift,
  input  logic              ro_sdi,
  output logic              ro_sdo
);

  logic disc_list, disc_cnt;
  logic [CNT_W-1:0] cnt0, cnt1, idle_cnt;

  // Mode steering: the pulse reaches only one of the two structures.
  assign disc_list = disc &  list_mode;
  assign disc_cnt  = disc & ~list_mode;

  hit_ff u_hit (
    .disc   (disc_list),
    .clr    (hit_clr | rst),
    .gate   (gate),
    .bypass (hit_bypass),
    .hit_q  (),
    .hit_out(hit_out)
  );

  counter_pair #(.CNT_W(CNT_W)) u_cnt (
    .hit     (disc_cnt),
    .sel     (cnt_sel),
    .clr_idle(cnt_clr),
    .rst     (rst),
    .cnt0    (cnt0),
    .cnt1    (cnt1),
    .idle_cnt(idle_cnt)
  );

  config_register #(.W(TRIM_W)) u_trim (
    .cfg_clk(cfg_clk),
    .rst_n  (cfg_rst_n),
    .en     (cfg_en),
    .sdi    (cfg_sdi),
    .sdo    (cfg_sdo),
    .q      (trim)
  );

  readout_sr #(.W(CNT_W)) u_ro (
    .ro_clk(ro_clk),
    .load  (ro_load),
    .shift (ro_shift),
    .pdata (idle_cnt),
    .sdi   (ro_sdi),
    .sdo   (ro_sdo)
  );

endmodule
