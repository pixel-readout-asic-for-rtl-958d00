// tb_counter_pair: self-checking test of the double-buffered hit counters.
// Pulses are counted into the selected counter while the other holds; the
// selection is switched, idle counters are cleared, and the counts are compared
// with counts kept by the testbench. A wrap test uses a 4-bit instance.
module tb_counter_pair;
  localparam int unsigned W = 32;
  logic hit = 0, sel = 0, clr_idle = 0, rst = 0;
  logic [W-1:0] cnt0, cnt1, idle_cnt;
  logic hit4 = 0, rst4 = 0;
  logic [3:0] c40, c41, i4;
  int checks = 0, failures = 0;
  longint ref0, ref1;

  counter_pair dut (.*);
  counter_pair #(.CNT_W(4)) dut4 (.hit(hit4), .sel(1'b0), .clr_idle(1'b0), .rst(rst4),
                                  .cnt0(c40), .cnt1(c41), .idle_cnt(i4));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic pulses(input int n);
    repeat (n) begin #1 hit = 1; #1 hit = 0; end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1; rst4 = 1; #1 rst = 0; rst4 = 0; #1;
    ref0 = 0; ref1 = 0;
    check(cnt0, 0, "reset cnt0");
    check(cnt1, 0, "reset cnt1");
    pulses(10); ref0 += 10;
    check(cnt0, ref0, "count in 0");
    check(cnt1, 0, "1 holds");
    check(idle_cnt, 0, "idle is 1");
    sel = 1; #1;
    check(idle_cnt, ref0, "idle is 0 after swap");
    pulses(7); ref1 += 7;
    check(cnt1, ref1, "count in 1");
    check(cnt0, ref0, "0 holds while read");
    clr_idle = 1; #1 clr_idle = 0; #1; ref0 = 0;
    check(cnt0, 0, "idle 0 cleared");
    check(cnt1, ref1, "active 1 kept by clear");
    for (int k = 0; k < 100; k++) begin
      int n = $urandom_range(0, 20);
      sel = 1'($urandom); #1;
      pulses(n);
      if (sel) ref1 += n; else ref0 += n;
      if ($urandom_range(0, 5) == 0) begin
        clr_idle = 1; #1 clr_idle = 0; #1;
        if (sel) ref0 = 0; else ref1 = 0;
      end
      check(cnt0, ref0, "random cnt0");
      check(cnt1, ref1, "random cnt1");
      check(idle_cnt, sel ? ref0 : ref1, "random idle");
    end
    // wrap-around of a narrow instance
    repeat (17) begin #1 hit4 = 1; #1 hit4 = 0; end
    check(c40, 1, "4-bit counter wraps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
