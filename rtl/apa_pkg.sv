// apa_pkg: widths, field layouts and constants shared by the pixel readout chip.
//
// The chip is a 4x4 array of APD readout pixels. Each pixel turns the current
// pulse of its avalanche photodiode into a discriminator pulse, which either
// sets a hit flip-flop (list mode, for external time stamping) or increments one
// of two 32-bit counters (counting mode). The array size and the counter width
// follow the published chip; the widths of the configuration fields (threshold
// DAC code, gain code, trim code) are choices of this design, sized so that the
// trim spans the +/-64 counts the trim circuit is specified for.
package apa_pkg;

  // Array size and counter depth of the chip.
  localparam int unsigned NX_DEF    = 4;
  localparam int unsigned NY_DEF    = 4;
  localparam int unsigned CNT_W_DEF = 32;

  // Configuration field widths (design choices).
  localparam int unsigned THR_W  = 8;  // global threshold DAC code
  localparam int unsigned GAIN_W = 2;  // transimpedance gain code, R = (code+1) kOhm
  localparam int unsigned TRIM_W = 7;  // per-pixel trim, two's complement -64..+63

  // Global settings, held in the first register of the configuration chain.
  typedef struct packed {
    logic [THR_W-1:0]  thr_code;   // global threshold DAC code
    logic [GAIN_W-1:0] gain;       // transimpedance gain select
    logic              polarity;   // 1: invert the input current (other APD type)
    logic              list_mode;  // 1: list mode, 0: counting mode
    logic              hit_bypass; // 1: bypass the hit flip-flop in list mode
  } global_cfg_t;

  localparam int unsigned GCFG_W = $bits(global_cfg_t);

  // Width of a field holding 0..n-1 (at least one bit).
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
