// tb_readout_sr: self-checking test of the readout shift register segment.
// A 5-bit head segment chained to a 32-bit segment is loaded with random
// words; 37 shifts must return the head MSB first, then the 32-bit word MSB
// first, then the bits fed in at the tail. Load must win over shift.
module tb_readout_sr;
  logic ro_clk = 0, load = 0, shift = 0, sdi = 0;
  logic [4:0]  p5;
  logic [31:0] p32;
  logic link, sdo;
  int checks = 0, failures = 0;

  readout_sr #(.W(5))  u_head (.ro_clk, .load, .shift, .pdata(p5),  .sdi(link), .sdo);
  readout_sr           u_tail (.ro_clk, .load, .shift, .pdata(p32), .sdi,       .sdo(link));

  always #5 ro_clk = ~ro_clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge ro_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 50; k++) begin
      logic [36:0] exp_stream;
      logic [3:0]  tail_bits;
      p5 = 5'($urandom); p32 = $urandom; tail_bits = 4'($urandom);
      exp_stream = {p5, p32};
      @(negedge ro_clk); load = 1; shift = (k % 2 == 1);  // load wins over shift
      @(negedge ro_clk); load = 0; shift = 1;
      for (int b = 0; b < 37; b++) begin
        check(sdo, exp_stream[36-b], $sformatf("stream bit %0d", b));
        sdi = tail_bits[3 - (b % 4)];
        @(negedge ro_clk);
      end
      // the first tail bit fed in has now reached the output after 37 shifts
      check(sdo, tail_bits[3], "tail bit arrives");
      shift = 0;
      @(negedge ro_clk);
      check(sdo, tail_bits[3], "hold without shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
