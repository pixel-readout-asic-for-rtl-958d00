// tb_or_tree: self-checking test of the global OR tree at 16 inputs (the chip)
// and at 5 and 1 inputs (odd and trivial tree shapes): single hot inputs,
// all-zero and random vectors against a plain reduction OR.
module tb_or_tree;
  logic [15:0] in16; logic out16;
  logic [4:0]  in5;  logic out5;
  logic [0:0]  in1;  logic out1;
  int checks = 0, failures = 0;

  or_tree #(.N(16)) dut16 (.in(in16), .out(out16));
  or_tree #(.N(5))  dut5  (.in(in5),  .out(out5));
  or_tree #(.N(1))  dut1  (.in(in1),  .out(out1));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in16 = 0; in5 = 0; in1 = 0; #1;
    check(out16, 0, "16 all zero"); check(out5, 0, "5 all zero"); check(out1, 0, "1 zero");
    for (int i = 0; i < 16; i++) begin
      in16 = 16'(1) << i; #1 check(out16, 1, $sformatf("16 one-hot %0d", i));
    end
    for (int i = 0; i < 5; i++) begin
      in5 = 5'(1) << i; #1 check(out5, 1, $sformatf("5 one-hot %0d", i));
    end
    in1 = 1; #1 check(out1, 1, "1 one");
    for (int k = 0; k < 200; k++) begin
      in16 = ($urandom_range(0, 3) == 0) ? 16'(0) : 16'($urandom) & 16'($urandom) & 16'($urandom);
      in5  = 5'($urandom) & 5'($urandom);
      #1;
      check(out16, in16 != 0, $sformatf("16 random %h", in16));
      check(out5, in5 != 0, "5 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
