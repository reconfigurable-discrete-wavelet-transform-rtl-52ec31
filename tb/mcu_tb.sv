// mcu_tb -- self-checking test of the MCU core cell: random operands in all
// three modes, plus the integer (5,3) lifting cases, against the integer
// formula of the reference model.
module mcu_tb;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic signed [15:0] a, b, c, d, coef;
  mcu_mode_e          mode;
  int checks = 0, failures = 0;

  mcu dut (.a(a), .b(b), .c(c), .mode(mode), .coef(coef), .d(d));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(d) !== exp) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d c=%0d mode=%0d coef=%0d -> %0d, expected %0d",
               what, a, b, c, mode, coef, d, exp);
    end
  endtask

  initial begin
    // (5,3) predict: d - floor((s0+s1)/2)
    for (int i = 0; i < 200; i++) begin
      a = 16'($urandom_range(0, 511)) - 16'sd256;
      b = 16'($urandom_range(0, 511)) - 16'sd256;
      c = 16'($urandom_range(0, 511)) - 16'sd256;
      mode = MCU_ADD; coef = -16'sd2048;
      #1 check(int'(a) - int'($floor((real'(b) + real'(c)) / 2.0)), "53 predict");
      coef = 16'sd1024;
      #1 check(int'(a) + int'($floor((real'(b) + real'(c) + 2.0) / 4.0)), "53 update");
    end
    // random, all modes
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      c = 16'($urandom);
      coef = 16'($urandom);
      mode = mcu_mode_e'($urandom_range(0, 2));
      #1 check(mcu_ref(int'(a), int'(b), int'(c), mode, int'(coef)), "random");
    end
    // single mode ignores C
    a = 16'sd100; b = 16'sd40; c = 16'sd999; coef = 16'sd2048; mode = MCU_SINGLE;
    #1 check(120, "single");
    mode = MCU_SUB;
    #1 check(100 + int'($floor((40.0 - 999.0) / 2.0 + 0.5)), "sub");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
