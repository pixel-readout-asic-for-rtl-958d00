// tb_config_register: self-checking test of the serial configuration register.
// Random words are shifted into a chain of two registers (7 and 13 bits);
// both parallel outputs must hold the words, the register must hold while
// disabled, and the asynchronous reset must clear it.
module tb_config_register;
  logic cfg_clk = 0, rst_n = 1, en = 0, sdi = 0;
  logic link, sdo;
  logic [12:0] qa;
  logic [6:0]  qb;
  int checks = 0, failures = 0;

  config_register #(.W(13)) u_a (.cfg_clk, .rst_n, .en, .sdi,       .sdo(link), .q(qa));
  config_register           u_b (.cfg_clk, .rst_n, .en, .sdi(link), .sdo,       .q(qb));

  always #5 cfg_clk = ~cfg_clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge cfg_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #1 check(qa, 0, "reset a"); check(qb, 0, "reset b");
    rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      logic [19:0] word;  // {b, a}: b's bits go in first
      word = 20'($urandom);
      @(negedge cfg_clk); en = 1;
      for (int b = 19; b >= 0; b--) begin
        sdi = word[b];
        @(negedge cfg_clk);
      end
      en = 0;
      check(qa, word[12:0], "a loaded");
      check(qb, word[19:13], "b loaded");
      check(sdo, word[19], "chain output is b msb");
      sdi = ~sdi;
      repeat (3) @(negedge cfg_clk);
      check(qa, word[12:0], "a holds");
    end
    rst_n = 0; #1;
    check(qa, 0, "async reset a"); check(qb, 0, "async reset b");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
