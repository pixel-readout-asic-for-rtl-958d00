// tb_apa2_digital: self-checking test of the digital core, driven directly at
// the discriminator inputs. It loads the configuration chain and checks the
// settings; counts random pulse patterns into both counters with a swap while
// the idle counter is read out; checks the order of the readout stream
// (location bits, then pixel 0 .. pixel 15, MSB first, then the daisy-chain
// input); and in list mode checks the hit OR, the location and the gating.
module tb_apa2_digital;
  import apa_pkg::*;
  localparam int NPIX = 16, CNT_W = 32, STREAM_W = 5 + NPIX * CNT_W;

  logic [NPIX-1:0] disc = '0;
  logic [NPIX-1:0][TRIM_W-1:0] trim;
  logic [THR_W-1:0] thr_code;
  logic [GAIN_W-1:0] gain;
  logic polarity;
  logic rst = 0, hit_clr = 0, cnt_sel = 0, cnt_clr = 0, hit_or;
  logic cfg_clk = 0, cfg_rst_n = 1, cfg_en = 0, cfg_sdi = 0, cfg_sdo;
  logic ro_clk = 0, ro_load = 0, ro_shift = 0, ro_sdi = 0, ro_sdo;
  int checks = 0, failures = 0;
  longint exp_cnt [2][NPIX];
  global_cfg_t g;
  logic [NPIX-1:0][TRIM_W-1:0] trims;

  apa2_digital dut (.*);

  always #5 ro_clk  = ~ro_clk;
  always #5 cfg_clk = ~cfg_clk;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic load_config();
    logic [GCFG_W + NPIX*TRIM_W - 1:0] v;
    v = {trims, g};
    @(negedge cfg_clk); cfg_en = 1;
    for (int b = $bits(v) - 1; b >= 0; b--) begin cfg_sdi = v[b]; @(negedge cfg_clk); end
    cfg_en = 0;
    check(thr_code, g.thr_code, "threshold code");
    check(gain, g.gain, "gain");
    check(polarity, g.polarity, "polarity");
    check(trim, trims, "trims");
    check(cfg_sdo, trims[NPIX-1][TRIM_W-1], "config chain output");
    rst = 1; #1 rst = 0; #1;
    for (int w = 0; w < 2; w++) for (int i = 0; i < NPIX; i++) exp_cnt[w][i] = 0;
  endtask

  task automatic pulse(input logic [NPIX-1:0] mask);
    #1 disc = mask;
    if (!g.list_mode) for (int i = 0; i < NPIX; i++) if (mask[i]) exp_cnt[cnt_sel][i]++;
    #2 disc = '0; #1;
  endtask

  task automatic read_stream(output logic [STREAM_W+3:0] s);
    @(negedge ro_clk); ro_load = 1;
    @(negedge ro_clk); ro_load = 0; ro_shift = 1;
    for (int b = STREAM_W + 3; b >= 0; b--) begin
      s[b] = ro_sdo;
      ro_sdi = (b % 2 == 0);   // daisy-chain input pattern
      @(negedge ro_clk);
    end
    ro_shift = 0;
  endtask

  initial begin
    repeat (100000) @(posedge ro_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [STREAM_W+3:0] s;
    #1 cfg_rst_n = 0; #1 cfg_rst_n = 1;
    g = '{thr_code: 8'($urandom), gain: 2'($urandom), polarity: 1'b1, list_mode: 1'b0, hit_bypass: 1'b0};
    trims = {NPIX{7'h00}};
    for (int i = 0; i < NPIX; i++) trims[i] = 7'($urandom);
    load_config();
    for (int f = 0; f < 4; f++) begin
      int old;
      repeat (30) pulse(NPIX'($urandom));
      old = int'(cnt_sel);
      cnt_sel = ~cnt_sel; #1;
      fork
        read_stream(s);
        repeat (30) pulse(NPIX'($urandom));
      join
      check(s[STREAM_W+3], 0, "no location in counting mode");
      for (int i = 0; i < NPIX; i++)
        check(s[STREAM_W+3-5-i*CNT_W -: CNT_W], exp_cnt[old][i], $sformatf("frame %0d pixel %0d", f, i));
      check(s[3:0], 4'b1010, "daisy-chain input follows");  // first bits fed: b = 520, 519, ...

      cnt_clr = 1; #1 cnt_clr = 0; #1;
      for (int i = 0; i < NPIX; i++) exp_cnt[old][i] = 0;
    end
    g.list_mode = 1'b1;
    load_config();
    for (int k = 0; k < 10; k++) begin
      int p, q;
      p = $urandom_range(1, NPIX-1);
      q = $urandom_range(0, p-1);
      check(hit_or, 0, "idle");
      pulse(NPIX'(1) << p);
      check(hit_or, 1, "hit OR");
      pulse(NPIX'(1) << q);
      read_stream(s);
      check(s[STREAM_W+3 -: 5], {1'b1, 2'(p % 4), 2'(p / 4)}, "location of first hit");
      hit_clr = 1; #1 hit_clr = 0; #1;
    end
    g.hit_bypass = 1'b1;
    load_config();
    disc[11] = 1; #1 check(hit_or, 1, "bypass high");
    disc[11] = 0; #1 check(hit_or, 0, "bypass low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
