// analog_frontend: behavioural model (not synthesizable logic) of one pixel's
// analog front-end: transimpedance amplifier, polarity switch and discriminator
// with a global threshold and a per-pixel trim.
//
// The APD current `i_in_na` (nA, signed) is inverted when `polarity` is set, so
// either APD type gives positive pulses, and converted to a voltage by the
// transimpedance R = (gain+1) kOhm: V[uV] = I[nA] * R[kOhm]. The discriminator
// output `disc` is high while V exceeds the threshold
//   thr_code * THR_LSB_UV + trim * TRIM_LSB_UV
// where `thr_code` is the code of the global on-chip threshold DAC and `trim`
// the pixel's two's-complement trim code (-64..+63). The model has no delay,
// noise or hysteresis: `disc` follows the input within the same time step.
// Following the chip: programmable-gain TIA, global threshold fine-tuned per
// pixel over +/-64 trim counts, polarity switch. Own choices: the gain steps and
// the DAC and trim step sizes, which set no more than the model's scale.
module analog_frontend #(
  parameter int THR_LSB_UV  = 1000,  // threshold DAC step, uV
  parameter int TRIM_LSB_UV = 100    // trim step, uV
) (
  input  int                                i_in_na,   // APD current, nA
  input  logic [apa_pkg::GAIN_W-1:0]        gain,
  input  logic                              polarity,
  input  logic [apa_pkg::THR_W-1:0]         thr_code,
  input  logic signed [apa_pkg::TRIM_W-1:0] trim,
  output logic                              disc
);

  int i_eff_na;
  int r_kohm;
  int v_uv;
  int thr_uv;

  always_comb begin
    i_eff_na = polarity ? -i_in_na : i_in_na;
    r_kohm   = int'(gain) + 1;
    v_uv     = i_eff_na * r_kohm;
    thr_uv   = int'(thr_code) * THR_LSB_UV + int'(trim) * TRIM_LSB_UV;
    disc     = (v_uv > thr_uv);
  end

endmodule
