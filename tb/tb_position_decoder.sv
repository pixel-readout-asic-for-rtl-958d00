// tb_position_decoder: self-checking test of the position decoder on the 4x4
// array and on a 3x5 array. Every single hit must give its (x,y); no hit must
// clear valid; several hits must give the lowest pixel index.
module tb_position_decoder;
  logic [15:0] h44; logic v44; logic [1:0] x44, y44;
  logic [14:0] h35; logic v35; logic [1:0] x35; logic [2:0] y35;
  int checks = 0, failures = 0;

  position_decoder dut44 (.hits(h44), .valid(v44), .x(x44), .y(y44));
  position_decoder #(.NX(3), .NY(5)) dut35 (.hits(h35), .valid(v35), .x(x35), .y(y35));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h44 = 0; h35 = 0; #1;
    check(v44, 0, "no hit 4x4"); check(v35, 0, "no hit 3x5");
    for (int yy = 0; yy < 4; yy++)
      for (int xx = 0; xx < 4; xx++) begin
        h44 = 0; h44[yy*4+xx] = 1; #1;
        check(v44, 1, "valid 4x4"); check(x44, xx, "x 4x4"); check(y44, yy, "y 4x4");
      end
    for (int yy = 0; yy < 5; yy++)
      for (int xx = 0; xx < 3; xx++) begin
        h35 = 0; h35[yy*3+xx] = 1; #1;
        check(v35, 1, "valid 3x5"); check(x35, xx, "x 3x5"); check(y35, yy, "y 3x5");
      end
    for (int k = 0; k < 200; k++) begin
      int low;
      h44 = 16'($urandom);
      if (h44 == 0) h44 = 16'h8000;
      low = 0;
      while (!h44[low]) low++;
      #1;
      check(v44, 1, "valid multi");
      check(x44, low % 4, "x multi");
      check(y44, low / 4, "y multi");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
