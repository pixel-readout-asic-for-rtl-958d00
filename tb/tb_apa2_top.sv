// tb_apa2_top: end-to-end test of the pixel readout chip at its full size
// (4x4 pixels, 32-bit counters), driven through the APD current inputs.
//
// The testbench keeps its own model of every pixel: the switching current from
// threshold, trim, gain and polarity, and the two counters of each pixel. It
//  1. loads global settings and the 16 trims through the configuration chain
//     and checks the chain output and the settings seen by the front-ends;
//  2. counts current pulses (some below threshold, some only above a trimmed
//     threshold) in counting mode into counter 0, swaps to counter 1 and keeps
//     injecting pulses while counter 0 is read out through the serial chain,
//     then clears, swaps back and reads counter 1;
//  3. repeats with inverted polarity and a higher gain;
//  4. in list mode checks the hit OR, the (x,y) location at the head of the
//     stream, the blocking of a second pixel, re-arming, simultaneous hits and
//     the hit flip-flop bypass.
// Each mechanism is counted and a mechanism never exercised counts a failure.
module tb_apa2_top;
  import apa_pkg::*;
  localparam int NPIX  = 16;
  localparam int CNT_W = 32;
  localparam int STREAM_W = 5 + NPIX * CNT_W;

  int   i_apd_na [NPIX];
  logic rst = 0, hit_clr = 0, cnt_sel = 0, cnt_clr = 0, hit_or;
  logic cfg_clk = 0, cfg_rst_n = 1, cfg_en = 0, cfg_sdi = 0, cfg_sdo;
  logic ro_clk = 0, ro_load = 0, ro_shift = 0, ro_sdi = 0, ro_sdo;

  apa2_top dut (.*);

  always #5 ro_clk  = ~ro_clk;
  always #5 cfg_clk = ~cfg_clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_cfg_load, n_counted, n_below_thr, n_trim_decides, n_swap_during_ro;
  int n_idle_clear, n_polarity, n_gain, n_list_latch, n_double_blocked;
  int n_rearm, n_simultaneous, n_bypass;

  // testbench model
  global_cfg_t g;
  logic signed [TRIM_W-1:0] trims [NPIX];
  longint exp_cnt [2][NPIX];

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // Switching decision of a pixel's front-end for the given settings.
  function automatic bit fires_with(int amp_na, int thr_code, int trim, int gain, bit pol);
    int i_eff;
    i_eff = pol ? -amp_na : amp_na;
    return i_eff * (gain + 1) > thr_code * 1000 + trim * 100;
  endfunction

  function automatic bit model_fires(int pix, int amp_na);
    return fires_with(amp_na, int'(g.thr_code), int'(trims[pix]), int'(g.gain), g.polarity);
  endfunction

  task automatic load_config();
    logic [GCFG_W + NPIX*TRIM_W - 1:0] v;
    v = '0;
    for (int i = 0; i < NPIX; i++) v[GCFG_W + i*TRIM_W +: TRIM_W] = trims[i];
    v[GCFG_W-1:0] = g;
    @(negedge cfg_clk); cfg_en = 1;
    for (int b = $bits(v) - 1; b >= 0; b--) begin
      cfg_sdi = v[b];
      @(negedge cfg_clk);
    end
    cfg_en = 0;
    check(cfg_sdo, trims[NPIX-1][TRIM_W-1], "config chain output");
    check(dut.thr_code, g.thr_code, "threshold code");
    check(dut.gain, g.gain, "gain");
    check(dut.polarity, g.polarity, "polarity");
    for (int i = 0; i < NPIX; i++) check(dut.trim[i], $unsigned(trims[i]), "pixel trim");
    n_cfg_load++;
    // settings pass through arbitrary values while shifting, which can fire
    // discriminators: clear counters and hit flip-flops afterwards
    rst = 1; #1 rst = 0; #1;
    for (int w = 0; w < 2; w++) for (int i = 0; i < NPIX; i++) exp_cnt[w][i] = 0;
  endtask

  // One current pulse of amp_na on the pixels in mask, 3 ns long.
  task automatic inject(input logic [NPIX-1:0] mask, input int amp_na);
    #1;
    for (int i = 0; i < NPIX; i++) if (mask[i]) i_apd_na[i] = amp_na;
    #3;
    for (int i = 0; i < NPIX; i++) i_apd_na[i] = 0;
    #2;
  endtask

  // Counting-mode pulse with bookkeeping.
  task automatic count_pulse(input logic [NPIX-1:0] mask, input int amp_na);
    logic sel_now;
    sel_now = cnt_sel;
    for (int i = 0; i < NPIX; i++) if (mask[i]) begin
      bit f;
      f = model_fires(i, amp_na);
      if (f) begin
        exp_cnt[sel_now][i]++;
        n_counted++;
        if (g.polarity) n_polarity++;
      end else n_below_thr++;
      // the trim changed the outcome
      if (f != fires_with(amp_na, int'(g.thr_code), 0, int'(g.gain), g.polarity)) n_trim_decides++;
      // the gain changed the outcome against 2 kOhm
      if (f != fires_with(amp_na, int'(g.thr_code), int'(trims[i]), 1, g.polarity)) n_gain++;
    end
    inject(mask, amp_na);
  endtask

  task automatic random_pulses(input int n, input int amp_lo, input int amp_hi);
    repeat (n) count_pulse(NPIX'($urandom), $urandom_range(amp_lo, amp_hi));
  endtask

  task automatic read_stream(output logic [STREAM_W-1:0] s);
    @(negedge ro_clk); ro_load = 1;
    @(negedge ro_clk); ro_load = 0; ro_shift = 1;
    for (int b = STREAM_W - 1; b >= 0; b--) begin
      s[b] = ro_sdo;
      @(negedge ro_clk);
    end
    ro_shift = 0;
  endtask

  task automatic check_counters(input logic [STREAM_W-1:0] s, input int which, input string what);
    for (int i = 0; i < NPIX; i++)
      check(s[STREAM_W-6 - i*CNT_W -: CNT_W], exp_cnt[which][i], $sformatf("%s pixel %0d", what, i));
  endtask

  // Swap counters while pulses keep arriving, read the idle one, clear it.
  task automatic frame(input int amp_lo, input int amp_hi, input string what);
    logic [STREAM_W-1:0] s;
    int old;
    old = int'(cnt_sel);
    cnt_sel = ~cnt_sel; #1;
    fork
      read_stream(s);
      random_pulses(40, amp_lo, amp_hi);
    join
    n_swap_during_ro++;
    check_counters(s, old, what);
    check(s[STREAM_W-1], 0, "no location valid in counting mode");
    cnt_clr = 1; #1 cnt_clr = 0; #1;
    for (int i = 0; i < NPIX; i++) exp_cnt[old][i] = 0;
    n_idle_clear++;
  endtask

  task automatic list_hit(input int pix, input int amp);
    inject(NPIX'(1) << pix, amp);
  endtask

  initial begin
    repeat (200000) @(posedge ro_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [STREAM_W-1:0] s;
    for (int i = 0; i < NPIX; i++) i_apd_na[i] = 0;
    for (int w = 0; w < 2; w++) for (int i = 0; i < NPIX; i++) exp_cnt[w][i] = 0;
    #1 cfg_rst_n = 0; rst = 1; #2 cfg_rst_n = 1; rst = 0;

    // 1. configuration: 20 mV threshold, 2 kOhm: 10 uA switching current
    g = '{thr_code: 8'd20, gain: 2'd1, polarity: 1'b0, list_mode: 1'b0, hit_bypass: 1'b0};
    for (int i = 0; i < NPIX; i++) trims[i] = TRIM_W'($urandom_range(0, 20) - 10);
    trims[5] = 7'sd63;    // 13.15 uA
    trims[6] = -7'sd64;   //  6.8 uA
    load_config();

    // 2. counting mode, pulses from 5 to 16 uA
    random_pulses(60, 5000, 16000);
    count_pulse(16'hFFFF, 12000);  // above 10 uA, below pixel 5's 13.15 uA
    count_pulse(16'hFFFF, 8000);   // only pixel 6 fires
    frame(5000, 16000, "frame A");
    frame(5000, 16000, "frame B");

    // 3. inverted polarity and 4 kOhm gain: negative pulses, 5 uA switching
    g.polarity = 1'b1; g.gain = 2'd3;
    load_config();
    random_pulses(40, -9000, 2000);
    frame(-9000, 2000, "frame C");
    frame(-9000, 2000, "frame D");

    // 4. list mode
    g = '{thr_code: 8'd20, gain: 2'd1, polarity: 1'b0, list_mode: 1'b1, hit_bypass: 1'b0};
    for (int i = 0; i < NPIX; i++) trims[i] = '0;
    load_config();
    hit_clr = 1; #1 hit_clr = 0; #1;
    for (int k = 0; k < 8; k++) begin
      int p, q;
      // q below p: had q latched too, the decoder would report q instead of p
      p = $urandom_range(1, NPIX-1);
      q = $urandom_range(0, p-1);
      check(hit_or, 0, "hit OR idle");
      list_hit(p, 15000);
      check(hit_or, 1, "hit OR after hit"); n_list_latch++;
      list_hit(q, 15000);  // blocked by the gate
      read_stream(s);
      check(s[STREAM_W-1], 1, "location valid");
      check(s[STREAM_W-2 -: 2], p % 4, "location x");
      check(s[STREAM_W-4 -: 2], p / 4, "location y, second pixel blocked");
      n_double_blocked++;
      hit_clr = 1; #1 hit_clr = 0; #1;
      check(hit_or, 0, "re-armed"); n_rearm++;
    end
    // pixels 9 and 14 hit in the same instant: both latch, lowest index reported
    inject(16'h4200, 15000);
    read_stream(s);
    check(s[STREAM_W-1 -: 5], {1'b1, 2'd1, 2'd2}, "simultaneous hits give pixel 9");
    check(dut.u_core.g_pix[14].u_pix.u_hit.hit_q, 1, "pixel 14 also latched");
    n_simultaneous++;
    // no counting happened in list mode
    cnt_sel = ~cnt_sel; #1;
    read_stream(s);
    check_counters(s, int'(~cnt_sel), "list mode leaves counters");
    hit_clr = 1; #1 hit_clr = 0; #1;
    // bypass: the OR follows the current pulse, nothing stays latched
    g.hit_bypass = 1'b1;
    load_config();
    i_apd_na[3] = 15000; #1;
    check(hit_or, 1, "bypass: OR high during pulse");
    i_apd_na[3] = 0; #1;
    check(hit_or, 0, "bypass: OR low after pulse");
    i_apd_na[7] = 5000; #1;
    check(hit_or, 0, "bypass: pulse below threshold");
    i_apd_na[7] = 0;
    n_bypass++;

    // every mechanism must have happened
    if (n_cfg_load == 0)       begin failures++; $display("FAIL never: config load"); end
    if (n_counted == 0)        begin failures++; $display("FAIL never: counted hit"); end
    if (n_below_thr == 0)      begin failures++; $display("FAIL never: pulse below threshold"); end
    if (n_trim_decides == 0)   begin failures++; $display("FAIL never: trim decides"); end
    if (n_swap_during_ro == 0) begin failures++; $display("FAIL never: swap during readout"); end
    if (n_idle_clear == 0)     begin failures++; $display("FAIL never: idle clear"); end
    if (n_polarity == 0)       begin failures++; $display("FAIL never: polarity switch"); end
    if (n_gain == 0)           begin failures++; $display("FAIL never: gain change"); end
    if (n_list_latch == 0)     begin failures++; $display("FAIL never: list latch"); end
    if (n_double_blocked == 0) begin failures++; $display("FAIL never: double hit blocked"); end
    if (n_rearm == 0)          begin failures++; $display("FAIL never: re-arm"); end
    if (n_simultaneous == 0)   begin failures++; $display("FAIL never: simultaneous hits"); end
    if (n_bypass == 0)         begin failures++; $display("FAIL never: bypass"); end
    $display("mechanisms: cfg=%0d counted=%0d below_thr=%0d trim=%0d swap_ro=%0d clear=%0d pol=%0d gain=%0d latch=%0d blocked=%0d rearm=%0d simult=%0d bypass=%0d",
             n_cfg_load, n_counted, n_below_thr, n_trim_decides, n_swap_during_ro, n_idle_clear,
             n_polarity, n_gain, n_list_latch, n_double_blocked, n_rearm, n_simultaneous, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
