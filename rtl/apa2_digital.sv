// apa2_digital: digital core of the pixel readout chip.
//
// NX x NY pixels (pixel_logic), pixel index i = y*NX + x, share:
//  - a global OR tree of the pixels' hit outputs. Its output `hit_or` drives an
//    external TDC in list mode and is fed back to every pixel as the gate that
//    stops further pixels from latching once one has a hit;
//  - a position decoder turning the latched hit flags into (x,y);
//  - a configuration chain: cfg_sdi -> global settings (apa_pkg::global_cfg_t)
//    -> trim of pixel 0 -> ... -> trim of pixel NX*NY-1 -> cfg_sdo;
//  - a readout chain: on `ro_load` the head segment captures {valid, x, y} and
//    each pixel captures its idle counter; shifting then puts out, MSB first,
//    the location bits, then pixel 0's counter, pixel 1's counter, and so on.
//    `ro_sdi` enters behind the last pixel, so chips can be daisy-chained.
// The global threshold code, gain and polarity go out to the analog front-ends.
// Following the chip: array size, shared OR tree and position decoding, the
// readout stream with location bits ahead of the counter bits. Own choices:
// the configuration chain, the valid bit and the order of pixels in the chains.
module apa2_digital #(
  parameter int unsigned NX    = apa_pkg::NX_DEF,
  parameter int unsigned NY    = apa_pkg::NY_DEF,
  parameter int unsigned CNT_W = apa_pkg::CNT_W_DEF,
  localparam int unsigned NPIX = NX * NY,
  localparam int unsigned XW   = apa_pkg::idx_w(NX),
  localparam int unsigned YW   = apa_pkg::idx_w(NY)
) (
  // analog front-ends
  input  logic [NPIX-1:0]                 disc,
  output logic [NPIX-1:0][apa_pkg::TRIM_W-1:0] trim,
  output logic [apa_pkg::THR_W-1:0]       thr_code,
  output logic [apa_pkg::GAIN_W-1:0]      gain,
  output logic                            polarity,
  // control pads
  input  logic                            rst,      // clear hit flip-flops and counters
  input  logic                            hit_clr,  // re-arm list mode
  input  logic                            cnt_sel,  // counter that counts
  input  logic                            cnt_clr,  // clear the idle counters
  output logic                            hit_or,   // to the external TDC
  // configuration chain
  input  logic                            cfg_clk,
  input  logic                            cfg_rst_n,
  input  logic                            cfg_en,
  input  logic                            cfg_sdi,
  output logic                            cfg_sdo,
  // readout chain
  input  logic                            ro_clk,
  input  logic                            ro_load,
  input  logic                            ro_shift,
  input  logic                            ro_sdi,
  output logic                            ro_sdo
);
  import apa_pkg::*;

  localparam int unsigned HDR_W = 1 + XW + YW;

  global_cfg_t       gcfg;
  logic [GCFG_W-1:0] gcfg_q;
  logic [NPIX-1:0]   hit_out;
  logic [NPIX:0]     cfg_link;  // cfg_link[i+1] leaves pixel i
  logic [NPIX:0]     ro_link;   // ro_link[i] leaves pixel i, ro_link[NPIX] = ro_sdi
  logic              hdr_valid;
  logic [XW-1:0]     hdr_x;
  logic [YW-1:0]     hdr_y;

  config_register #(.W(GCFG_W)) u_gcfg (
    .cfg_clk(cfg_clk),
    .rst_n  (cfg_rst_n),
    .en     (cfg_en),
    .sdi    (cfg_sdi),
    .sdo    (cfg_link[0]),
    .q      (gcfg_q)
  );
  assign gcfg     = global_cfg_t'(gcfg_q);
  assign thr_code = gcfg.thr_code;
  assign gain     = gcfg.gain;
  assign polarity = gcfg.polarity;

  for (genvar i = 0; i < NPIX; i++) begin : g_pix
    pixel_logic #(.CNT_W(CNT_W), .TRIM_W(TRIM_W)) u_pix (
      .disc      (disc[i]),
      .trim      (trim[i]),
      .list_mode (gcfg.list_mode),
      .hit_bypass(gcfg.hit_bypass),
      .gate      (hit_or),
      .hit_clr   (hit_clr),
      .cnt_sel   (cnt_sel),
      .cnt_clr   (cnt_clr),
      .rst       (rst),
      .hit_out   (hit_out[i]),
      .cfg_clk   (cfg_clk),
      .cfg_rst_n (cfg_rst_n),
      .cfg_en    (cfg_en),
      .cfg_sdi   (cfg_link[i]),
      .cfg_sdo   (cfg_link[i+1]),
      .ro_clk    (ro_clk),
      .ro_load   (ro_load),
      .ro_shift  (ro_shift),
      .ro_sdi    (ro_link[i+1]),
      .ro_sdo    (ro_link[i])
    );
  end
  assign cfg_sdo       = cfg_link[NPIX];
  assign ro_link[NPIX] = ro_sdi;

  or_tree #(.N(NPIX)) u_or (
    .in (hit_out),
    .out(hit_or)
  );

  position_decoder #(.NX(NX), .NY(NY)) u_pos (
    .hits (hit_out),
    .valid(hdr_valid),
    .x    (hdr_x),
    .y    (hdr_y)
  );

  readout_sr #(.W(HDR_W)) u_hdr (
    .ro_clk(ro_clk),
    .load  (ro_load),
    .shift (ro_shift),
    .pdata ({hdr_valid, hdr_x, hdr_y}),
    .sdi   (ro_link[0]),
    .sdo   (ro_sdo)
  );

endmodule
