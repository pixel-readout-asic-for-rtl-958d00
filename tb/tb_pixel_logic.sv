// tb_pixel_logic: self-checking test of one pixel's digital logic.
// Loads a trim code through the configuration chain; in counting mode counts
// pulses into one counter, swaps, counts into the other and reads the idle
// counter out through the readout segment; in list mode checks that a pulse
// latches the hit, that counting stops, that the gate blocks and that bypass
// passes the pulse; then runs random frames with counter swaps during
// readout. Expected values come from the pulse counts the testbench
// generates.
module tb_pixel_logic;
  logic disc = 0;
  logic [6:0] trim;
  logic list_mode = 0, hit_bypass = 0, gate = 0, hit_clr = 0;
  logic cnt_sel = 0, cnt_clr = 0, rst = 0, hit_out;
  logic cfg_clk = 0, cfg_rst_n = 1, cfg_en = 0, cfg_sdi = 0, cfg_sdo;
  logic ro_clk = 0, ro_load = 0, ro_shift = 0, ro_sdi = 0, ro_sdo;
  int checks = 0, failures = 0;

  pixel_logic dut (.*);

  always #5 ro_clk  = ~ro_clk;
  always #7 cfg_clk = ~cfg_clk;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic pulses(input int n);
    repeat (n) begin #1 disc = 1; #2 disc = 0; #1; end
  endtask

  // Load the readout segment and shift its 32 bits out, MSB first.
  task automatic read_counter(output logic [31:0] word);
    @(negedge ro_clk); ro_load = 1;
    @(negedge ro_clk); ro_load = 0; ro_shift = 1;
    for (int b = 31; b >= 0; b--) begin
      word[b] = ro_sdo;
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
    logic [31:0] word;
    int n0, n1;
    #1 rst = 1; cfg_rst_n = 0; #2 rst = 0; cfg_rst_n = 1;
    // trim via configuration chain
    @(negedge cfg_clk); cfg_en = 1;
    for (int b = 6; b >= 0; b--) begin cfg_sdi = 7'h5A >> b; @(negedge cfg_clk); end
    cfg_en = 0;
    check(trim, 7'h5A, "trim loaded");
    check(cfg_sdo, 1'b1, "config chain out = trim msb");
    // counting mode, counter 0
    n0 = $urandom_range(5, 40);
    pulses(n0);
    check(hit_out, 0, "no list-mode hit while counting");
    cnt_sel = 1; #1;
    n1 = $urandom_range(5, 40);
    fork
      pulses(n1);          // counting goes on during readout
      read_counter(word);
    join
    check(word, n0, "idle counter 0 read out");
    cnt_clr = 1; #1 cnt_clr = 0;
    cnt_sel = 0; #1;
    read_counter(word);
    check(word, n1, "counter 1 read out after swap");
    cnt_sel = 1; #1;
    read_counter(word);
    check(word, 0, "counter 0 cleared after readout");
    // list mode
    cnt_sel = 0; cnt_clr = 1; #1 cnt_clr = 0;  // clear counter 1
    list_mode = 1;
    pulses(3);
    check(hit_out, 1, "list mode hit latched");
    cnt_sel = 1; #1;
    read_counter(word);
    check(word, 0, "no counting in list mode");
    hit_clr = 1; #1 hit_clr = 0; #1;
    check(hit_out, 0, "hit cleared");
    gate = 1; pulses(1);
    check(hit_out, 0, "gate blocks a hit");
    gate = 0;
    hit_bypass = 1; #1;
    check(hit_out, 0, "bypass idle");
    disc = 1; #1 check(hit_out, 1, "bypass passes pulse"); disc = 0; #1;
    check(hit_out, 0, "bypass pulse ends");
    // random counting frames: swap, count during readout, clear
    hit_bypass = 0; list_mode = 0;
    rst = 1; #1 rst = 0; #1;
    cnt_sel = 0; #1;
    n0 = 0; n1 = 0;
    for (int f = 0; f < 20; f++) begin
      int n_before, n_during;
      n_before = $urandom_range(0, 30);
      pulses(n_before);
      if (cnt_sel) n1 += n_before; else n0 += n_before;
      cnt_sel = ~cnt_sel; #1;
      n_during = $urandom_range(0, 30);
      fork
        pulses(n_during);
        read_counter(word);
      join
      if (cnt_sel) begin
        check(word, n0, "random frame, counter 0");
        n1 += n_during; n0 = 0;
      end else begin
        check(word, n1, "random frame, counter 1");
        n0 += n_during; n1 = 0;
      end
      check(hit_out, 0, "no hit output while counting");
      cnt_clr = 1; #1 cnt_clr = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
