// pe_context_memory_tb -- checks the default kernels of the PE context
// memory against coefficients computed here from their real values, and
// writes and reads back every RAM entry.
module pe_context_memory_tb;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] sel;
  pe_ctx_t    ctx, wdata;
  logic       we;
  logic [1:0] waddr;
  int checks = 0, failures = 0;
  pe_ctx_t    written [4];

  pe_context_memory dut (.clk(clk), .rst_n(rst_n), .sel(sel), .ctx(ctx), .we(we),
                         .waddr(waddr), .wdata(wdata));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q12(input real r);
    return int'($floor(r * 4096.0 + 0.5));
  endfunction

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    real k97 [4];
    k97[0] = -1.586134342; k97[1] = -0.052980118; k97[2] = 0.882911076; k97[3] = 0.443506852;
    sel = 0; we = 0; waddr = 0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // (5,3)
    sel = 3'd0; #1;
    expect_eq(int'(ctx.fold), 1, "53 fold");
    expect_eq(int'(ctx.nsteps), 2, "53 steps");
    expect_eq(int'(ctx.steps[0].target), int'(TGT_ODD), "53 s0 target");
    expect_eq(int'(ctx.steps[1].target), int'(TGT_EVEN), "53 s1 target");
    expect_eq(int'(ctx.steps[0].coef), q12(-0.5), "53 s0 coef");
    expect_eq(int'(ctx.steps[1].coef), q12(0.25), "53 s1 coef");
    // (9,7)
    sel = 3'd1; #1;
    expect_eq(int'(ctx.fold), 2, "97 fold");
    expect_eq(int'(ctx.nsteps), 4, "97 steps");
    for (int k = 0; k < 4; k++) begin
      expect_eq(int'(ctx.steps[k].coef), q12(k97[k]), $sformatf("97 coef %0d", k));
      expect_eq(int'(ctx.steps[k].target), k % 2, $sformatf("97 target %0d", k));
      expect_eq(int'(ctx.steps[k].mode), int'(MCU_ADD), $sformatf("97 mode %0d", k));
    end
    // RAM after reset reads zero
    for (int i = 0; i < 4; i++) begin
      sel = 3'(2 + i); #1;
      expect_eq(int'(ctx.nsteps), 0, "ram reset");
    end
    // write every RAM entry
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      written[i] = '0;
      written[i].fold = 2'($urandom_range(1, 2));
      written[i].nsteps = 3'($urandom_range(1, 4));
      for (int k = 0; k < MAX_STEPS; k++) written[i].steps[k] = lift_step_t'($urandom);
      we = 1; waddr = 2'(i); wdata = written[i];
      @(negedge clk);
      we = 0;
    end
    for (int i = 0; i < 4; i++) begin
      sel = 3'(2 + i); #1;
      checks++;
      if (ctx !== written[i]) begin
        failures++;
        $display("FAIL ram entry %0d", i);
      end
    end
    // PLA entries are not writable
    sel = 3'd0; #1;
    expect_eq(int'(ctx.steps[0].coef), q12(-0.5), "pla unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
