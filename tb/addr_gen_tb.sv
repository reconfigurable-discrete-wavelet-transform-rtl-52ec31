// addr_gen_tb -- checks the address sequence of one address generator for
// row and column passes at several levels and subband offsets, with the
// step input stalled at random, against nested loops written here.
module addr_gen_tb;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             start, step, valid, busy, first, last, pass_last;
  pass_t            pass;
  logic [COL_W:0]   img_w;
  logic [ROW_W:0]   img_h;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  int checks = 0, failures = 0;

  addr_gen dut (.clk(clk), .rst_n(rst_n), .start(start), .pass(pass), .img_w(img_w),
                .img_h(img_h), .step(step), .valid(valid), .busy(busy), .row(row), .col(col),
                .first(first), .last(last), .pass_last(pass_last));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int w, input int h, input dir_e dir, input int lvl,
                     input int ro, input int co);
    int stride, nl, np;
    stride = 1 << lvl;
    @(negedge clk);
    img_w = (COL_W+1)'(w); img_h = (ROW_W+1)'(h);
    pass = '0; pass.dir = dir; pass.level = LEVEL_W'(lvl);
    pass.row_off = ROW_W'(ro); pass.col_off = COL_W'(co);
    start = 1;
    @(negedge clk);
    start = 0;
    nl = ((dir == DIR_ROW) ? h : w) >> lvl;
    np = (((dir == DIR_ROW) ? w : h) >> lvl) / 2;
    for (int l = 0; l < nl; l++) begin
      for (int p = 0; p < np; p++) begin
        int er, ec;
        if (dir == DIR_ROW) begin er = ro + l * stride; ec = co + 2 * p * stride; end
        else                begin ec = co + l * stride; er = ro + 2 * p * stride; end
        step = 0;
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        checks++;
        if (!valid || int'(row) != er || int'(col) != ec || first != (p == 0) ||
            last != (p == np - 1) || pass_last != (p == np - 1 && l == nl - 1)) begin
          failures++;
          $display("FAIL dir %0d lvl %0d line %0d pair %0d: v=%0b row=%0d col=%0d f=%0b l=%0b, expected %0d,%0d",
                   dir, lvl, l, p, valid, row, col, first, last, er, ec);
        end
        step = 1;
        @(negedge clk);
      end
    end
    step = 0;
    checks++;
    if (valid || busy) begin
      failures++;
      $display("FAIL generator still busy after the pass");
    end
  endtask

  initial begin
    start = 0; step = 0; pass = '0; img_w = 0; img_h = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(16, 8, DIR_ROW, 0, 0, 0);
    run(16, 8, DIR_COL, 0, 0, 0);
    run(32, 16, DIR_ROW, 1, 1, 0);
    run(32, 16, DIR_COL, 2, 3, 2);
    run(64, 32, DIR_ROW, 3, 5, 7);
    run(720, 576, DIR_COL, 4, 9, 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
