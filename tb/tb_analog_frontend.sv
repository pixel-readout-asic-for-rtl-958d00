// tb_analog_frontend: self-checking test of the front-end behavioural model.
// Threshold crossings are worked out by hand at chosen points (gain, trim and
// polarity each moving the switching point), then random settings are
// compared with the switching current I_th = (thr*1000 + trim*100)/(gain+1) nA.
module tb_analog_frontend;
  int i_in_na;
  logic [1:0] gain;
  logic polarity;
  logic [7:0] thr_code;
  logic signed [6:0] trim;
  logic disc;
  int checks = 0, failures = 0;

  analog_frontend dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b exp %0b", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 2 kOhm (gain 1), threshold 20 mV: switches above 10 uA
    gain = 1; polarity = 0; thr_code = 20; trim = 0;
    i_in_na = 9000;  #1 check(disc, 0, "9 uA below");
    i_in_na = 10000; #1 check(disc, 0, "10 uA at threshold");
    i_in_na = 10001; #1 check(disc, 1, "just above");
    // trim +10 adds 1 mV: now 10.5 uA
    trim = 10;
    i_in_na = 10400; #1 check(disc, 0, "trim raises threshold");
    i_in_na = 10600; #1 check(disc, 1, "above trimmed threshold");
    // trim -64 lowers by 6.4 mV: 6.8 uA
    trim = -64;
    i_in_na = 7000;  #1 check(disc, 1, "negative trim lowers threshold");
    i_in_na = 6700;  #1 check(disc, 0, "below lowered threshold");
    // polarity: negative pulses are seen only with the switch set
    trim = 0; i_in_na = -20000;
    #1 check(disc, 0, "negative pulse, normal polarity");
    polarity = 1;
    #1 check(disc, 1, "negative pulse, inverted polarity");
    // gain 3 (4 kOhm) halves the switching current of 2 kOhm
    polarity = 0; gain = 3; i_in_na = 6000;
    #1 check(disc, 1, "higher gain switches earlier");
    gain = 0;
    #1 check(disc, 0, "1 kOhm needs 20 uA");
    for (int k = 0; k < 500; k++) begin
      int num, r;
      logic exp_d;
      gain = 2'($urandom); polarity = 1'($urandom);
      thr_code = 8'($urandom); trim = 7'($urandom);
      i_in_na = $urandom_range(0, 300000) - 100000;
      r = int'(gain) + 1;
      num = int'(thr_code) * 1000 + int'(trim) * 100;
      // disc <=> I_eff * r > num
      exp_d = ((polarity ? -i_in_na : i_in_na) * r) > num;
      #1 check(disc, exp_d, "random setting");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
