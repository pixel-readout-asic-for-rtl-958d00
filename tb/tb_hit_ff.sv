// tb_hit_ff: self-checking test of the list-mode hit flip-flop.
// Checks: a discriminator edge sets the flip-flop; a high gate blocks it; the
// asynchronous clear resets it; further pulses leave it set; bypass passes the
// raw pulse through. Expected values follow from the pulse sequence alone.
module tb_hit_ff;
  logic disc = 0, clr = 0, gate = 0, bypass = 0;
  logic hit_q, hit_out;
  int checks = 0, failures = 0;

  hit_ff dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b", what, got, exp);
    end
  endtask

  task automatic pulse();
    #2 disc = 1; #3 disc = 0; #2;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clr = 1; #1 clr = 0; #1;
    check(hit_q, 0, "cleared");
    check(hit_out, 0, "cleared out");
    pulse();
    check(hit_q, 1, "set by pulse");
    check(hit_out, 1, "out set");
    pulse();
    check(hit_q, 1, "stays set");
    clr = 1; #1;
    check(hit_q, 0, "async clear");
    clr = 0; #1;
    gate = 1;
    pulse();
    check(hit_q, 0, "gated pulse ignored");
    gate = 0;
    pulse();
    check(hit_q, 1, "set after gate release");
    clr = 1; #1 clr = 0; #1;
    // bypass: output follows the pulse, flip-flop state irrelevant
    bypass = 1;
    #1 check(hit_out, 0, "bypass low");
    disc = 1; #1 check(hit_out, 1, "bypass follows high");
    disc = 0; #1 check(hit_out, 0, "bypass follows low");
    bypass = 0;
    #1 check(hit_out, hit_q, "flip-flop output restored");
    // many random sequences against a reference
    begin
      logic ref_q = 0;
      clr = 1; #1 clr = 0;
      for (int k = 0; k < 200; k++) begin
        gate = 1'($urandom);
        if ($urandom_range(0, 4) == 0) begin clr = 1; #1 clr = 0; ref_q = 0; end
        pulse();
        if (!gate) ref_q = 1;
        check(hit_q, ref_q, "random sequence");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
