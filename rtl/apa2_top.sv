// apa2_top: the pixel readout chip with its analog front-ends.
//
// Each of the NX x NY pixels has an APD current input (`i_apd_na`, nA) feeding
// a front-end model (analog_frontend) whose discriminator drives the pixel's
// digital logic in the digital core (apa2_digital). The core supplies the
// front-ends with the global threshold code, gain and polarity from its
// configuration chain and with each pixel's trim code. Everything else is the
// core's pad interface: control pads, the list-mode hit OR for an external
// TDC, and the serial configuration and readout chains.
// The front-end is a behavioural model; the rest is synthesizable logic.
module apa2_top #(
  parameter int unsigned NX    = apa_pkg::NX_DEF,
  parameter int unsigned NY    = apa_pkg::NY_DEF,
  parameter int unsigned CNT_W = apa_pkg::CNT_W_DEF,
  localparam int unsigned NPIX = NX * NY
) (
  input  int   i_apd_na [NPIX],  // APD current per pixel, nA
  input  logic rst,
  input  logic hit_clr,
  input  logic cnt_sel,
  input  logic cnt_clr,
  output logic hit_or,
  input  logic cfg_clk,
  input  logic cfg_rst_n,
  input  logic cfg_en,
  input  logic cfg_sdi,
  output logic cfg_sdo,
  input  logic ro_clk,
  input  logic ro_load,
  input  logic ro_shift,
  input  logic ro_sdi,
  output logic ro_sdo
);
  import apa_pkg::*;

  logic [NPIX-1:0]              disc;
  logic [NPIX-1:0][TRIM_W-1:0]  trim;
  logic [THR_W-1:0]             thr_code;
  logic [GAIN_W-1:0]            gain;
  logic                         polarity;

  for (genvar i = 0; i < NPIX; i++) begin : g_fe
    analog_frontend u_fe (
      .i_in_na (i_apd_na[i]),
      .gain    (gain),
      .polarity(polarity),
      .thr_code(thr_code),
      .trim    (trim[i]),
      .disc    (disc[i])
    );
  end

  apa2_digital #(.NX(NX), .NY(NY), .CNT_W(CNT_W)) u_core (
    .disc     (disc),
    .trim     (trim),
    .thr_code (thr_code),
    .gain     (gain),
    .polarity (polarity),
    .rst      (rst),
    .hit_clr  (hit_clr),
    .cnt_sel  (cnt_sel),
    .cnt_clr  (cnt_clr),
    .hit_or   (hit_or),
    .cfg_clk  (cfg_clk),
    .cfg_rst_n(cfg_rst_n),
    .cfg_en   (cfg_en),
    .cfg_sdi  (cfg_sdi),
    .cfg_sdo  (cfg_sdo),
    .ro_clk   (ro_clk),
    .ro_load  (ro_load),
    .ro_shift (ro_shift),
    .ro_sdi   (ro_sdi),
    .ro_sdo   (ro_sdo)
  );

endmodule
