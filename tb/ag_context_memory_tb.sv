// ag_context_memory_tb -- checks the three default decomposition programs
// (pass count, pass order, levels, that every subband of every level of the
// packet program is visited exactly once along rows and then along
// columns) and writes and reads back the RAM program.
module ag_context_memory_tb;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]            prog;
  logic [PASS_IDX_W-1:0] idx, waddr;
  pass_t                 pass, wdata;
  logic                  we;
  int checks = 0, failures = 0;

  ag_context_memory dut (.clk(clk), .rst_n(rst_n), .prog(prog), .idx(idx), .pass(pass),
                         .we(we), .waddr(waddr), .wdata(wdata));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    pass_t ram_img [64];
    prog = 0; idx = 0; we = 0; waddr = 0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // program 0: one level
    prog = 0;
    idx = 0; #1 expect_eq(int'(pass.level), 0, "p0 i0 level");
    expect_eq(int'(pass.dir), 0, "p0 i0 dir");
    expect_eq(int'(pass.last), 0, "p0 i0 last");
    idx = 1; #1 expect_eq(int'(pass.dir), 1, "p0 i1 dir");
    expect_eq(int'(pass.last), 1, "p0 i1 last");
    // program 1: three-level dyadic
    prog = 1;
    for (int i = 0; i < 6; i++) begin
      idx = PASS_IDX_W'(i); #1;
      expect_eq(int'(pass.dir), i % 2, "dyadic dir");
      expect_eq(int'(pass.level), i / 2, "dyadic level");
      expect_eq(int'(pass.row_off) + int'(pass.col_off), 0, "dyadic offset");
      expect_eq(int'(pass.last), (i == 5), "dyadic last");
    end
    // program 2: four-level packet
    prog = 2;
    begin
      int i;
      i = 0;
      for (int l = 0; l < 4; l++) begin
        bit seen [8][8];
        for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) seen[r][c] = 0;
        for (int k = 0; k < (1 << (2 * l)); k++) begin
          int ro, co;
          idx = PASS_IDX_W'(i); #1;
          expect_eq(int'(pass.dir), 0, "wpt row first");
          expect_eq(int'(pass.level), l, "wpt level");
          ro = int'(pass.row_off); co = int'(pass.col_off);
          checks++;
          if (ro >= (1 << l) || co >= (1 << l) || seen[ro][co]) begin
            failures++;
            $display("FAIL wpt level %0d subband offset %0d,%0d", l, ro, co);
          end else seen[ro][co] = 1;
          idx = PASS_IDX_W'(i + 1); #1;
          expect_eq(int'(pass.dir), 1, "wpt col second");
          expect_eq(int'(pass.row_off), ro, "wpt same subband row");
          expect_eq(int'(pass.col_off), co, "wpt same subband col");
          expect_eq(int'(pass.last), (i + 1 == 169), "wpt last");
          i += 2;
        end
      end
      expect_eq(i, 170, "wpt pass count");
    end
    // program 3: RAM
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      ram_img[i] = pass_t'($urandom);
      we = 1; waddr = PASS_IDX_W'(i); wdata = ram_img[i];
      @(negedge clk);
      we = 0;
    end
    prog = 3;
    for (int i = 0; i < 64; i++) begin
      idx = PASS_IDX_W'(i); #1;
      checks++;
      if (pass !== ram_img[i]) begin
        failures++;
        $display("FAIL ram %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
