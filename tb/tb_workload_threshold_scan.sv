// tb_workload_threshold_scan: the chip's pulse-counting test run on the full
// 4x4 chip. For each global threshold code of a scan, 10,000 identical current
// pulses (10 uA, i.e. 20 mV at 2 kOhm) are injected into all 16 pixels at once
// and the counters are read out through the serial chain. With the ideal
// front-end model every pixel must count exactly 10,000 below the switching
// code (20) and nothing at or above it, giving the plateau-and-edge shape of
// an S-curve. A second scan keeps the threshold at code 20 and sweeps the
// per-pixel trim over -64..+63: negative trims must count every pulse.
module tb_workload_threshold_scan;
  import apa_pkg::*;
  localparam int NPIX = 16, CNT_W = 32, STREAM_W = 5 + NPIX * CNT_W;
  localparam int NPULSE = 10000;

  int   i_apd_na [NPIX];
  logic rst = 0, hit_clr = 0, cnt_sel = 0, cnt_clr = 0, hit_or;
  logic cfg_clk = 0, cfg_rst_n = 1, cfg_en = 0, cfg_sdi = 0, cfg_sdo;
  logic ro_clk = 0, ro_load = 0, ro_shift = 0, ro_sdi = 0, ro_sdo;
  int checks = 0, failures = 0;
  global_cfg_t g;
  logic [NPIX-1:0][TRIM_W-1:0] trims;

  apa2_top dut (.*);

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
    rst = 1; #1 rst = 0; #1;
  endtask

  // Count NPULSE pulses into counter 0, swap, read counter 0 out.
  task automatic run_point(input int exp_count, input string what);
    logic [STREAM_W-1:0] s;
    cnt_sel = 0; #1;
    repeat (NPULSE) begin
      for (int i = 0; i < NPIX; i++) i_apd_na[i] = 10000;
      #3;
      for (int i = 0; i < NPIX; i++) i_apd_na[i] = 0;
      #3;
    end
    cnt_sel = 1; #1;
    @(negedge ro_clk); ro_load = 1;
    @(negedge ro_clk); ro_load = 0; ro_shift = 1;
    for (int b = STREAM_W - 1; b >= 0; b--) begin s[b] = ro_sdo; @(negedge ro_clk); end
    ro_shift = 0;
    for (int i = 0; i < NPIX; i++)
      check(s[STREAM_W-6 - i*CNT_W -: CNT_W], exp_count, $sformatf("%s pixel %0d", what, i));
  endtask

  initial begin
    repeat (2000000) @(posedge ro_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int plateau = 0, edge_seen = 0;
    for (int i = 0; i < NPIX; i++) i_apd_na[i] = 0;
    #1 cfg_rst_n = 0; #1 cfg_rst_n = 1;
    trims = '0;
    for (int thr = 12; thr <= 28; thr += 2) begin
      g = '{thr_code: THR_W'(thr), gain: 2'd1, polarity: 1'b0, list_mode: 1'b0, hit_bypass: 1'b0};
      load_config();
      run_point(thr < 20 ? NPULSE : 0, $sformatf("threshold %0d", thr));
      if (thr < 20) plateau++; else edge_seen++;
    end
    g.thr_code = 8'd20;
    for (int t = -64; t <= 63; t += 32) begin
      for (int i = 0; i < NPIX; i++) trims[i] = TRIM_W'(t);
      load_config();
      run_point(t < 0 ? NPULSE : 0, $sformatf("trim %0d", t));
    end
    if (plateau == 0 || edge_seen == 0) begin failures++; $display("FAIL scan missed plateau or edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
