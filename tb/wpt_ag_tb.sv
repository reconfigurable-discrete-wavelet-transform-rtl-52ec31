// wpt_ag_tb -- checks the WPT address generator running a three-pass
// program: the read and the write address streams (the write side is
// stepped behind the read side with a random delay, as a pipeline would),
// that a pass starts reading only after the previous pass has written its
// last pair, the reported pass direction and level, and the done pulse.
module wpt_ag_tb;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  start, busy, done;
  logic [1:0]            prog, prog_q;
  logic [COL_W:0]        img_w;
  logic [ROW_W:0]        img_h;
  logic [PASS_IDX_W-1:0] pass_idx;
  pass_t                 pass;
  dir_e                  cur_dir;
  logic [LEVEL_W-1:0]    cur_level;
  logic                  in_valid, in_first, in_last, in_step, out_valid, out_step;
  logic [ROW_W-1:0]      in_row, out_row;
  logic [COL_W-1:0]      in_col, out_col;

  int checks = 0, failures = 0;
  pass_t prog_mem [3];
  int exp_in [$], exp_out [$];   // {pass, row, col} packed as pass*1e6 + row*1000 + col
  int pending = 0, cur_pass_in = 0, writes_done_pass = -1, dones = 0;

  assign pass = prog_mem[pass_idx < 3 ? pass_idx : 0];

  wpt_ag dut (.clk(clk), .rst_n(rst_n), .start(start), .prog(prog), .img_w(img_w), .img_h(img_h),
              .prog_q(prog_q), .pass_idx(pass_idx), .pass(pass), .cur_dir(cur_dir),
              .cur_level(cur_level), .busy(busy), .done(done), .in_valid(in_valid),
              .in_row(in_row), .in_col(in_col), .in_first(in_first), .in_last(in_last),
              .in_step(in_step), .out_valid(out_valid), .out_row(out_row), .out_col(out_col),
              .out_step(out_step));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expected(input int k, input pass_t p, input int w, input int h);
    int stride, nl, np;
    stride = 1 << int'(p.level);
    nl = ((p.dir == DIR_ROW) ? h : w) >> int'(p.level);
    np = (((p.dir == DIR_ROW) ? w : h) >> int'(p.level)) / 2;
    for (int l = 0; l < nl; l++)
      for (int q = 0; q < np; q++) begin
        int r, c;
        if (p.dir == DIR_ROW) begin r = int'(p.row_off) + l * stride; c = int'(p.col_off) + 2 * q * stride; end
        else begin c = int'(p.col_off) + l * stride; r = int'(p.row_off) + 2 * q * stride; end
        exp_in.push_back(k * 1000000 + r * 1000 + c);
        exp_out.push_back(k * 1000000 + r * 1000 + c);
      end
  endfunction

  // random stepping: reads when offered, writes behind the reads
  always @(negedge clk) begin
    in_step  = in_valid && ($urandom_range(0, 3) != 0);
    out_step = out_valid && pending > 0 && ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_step) begin
        int e;
        checks++;
        e = exp_in.size() ? exp_in.pop_front() : -1;
        if (e % 1000000 != int'(in_row) * 1000 + int'(in_col) || int'(pass_idx) != e / 1000000) begin
          failures++;
          $display("FAIL read address %0d,%0d (pass %0d), expected %0d", in_row, in_col, pass_idx, e);
        end
        checks++;
        if (writes_done_pass != int'(pass_idx) - 1) begin
          failures++;
          $display("FAIL pass %0d reads before pass %0d has written", pass_idx, int'(pass_idx) - 1);
        end
        checks++;
        if (cur_dir != prog_mem[pass_idx].dir || cur_level != prog_mem[pass_idx].level) begin
          failures++;
          $display("FAIL cur_dir/cur_level");
        end
        pending++;
      end
      if (out_valid && out_step) begin
        int e;
        checks++;
        e = exp_out.size() ? exp_out.pop_front() : -1;
        if (e % 1000000 != int'(out_row) * 1000 + int'(out_col)) begin
          failures++;
          $display("FAIL write address %0d,%0d, expected %0d", out_row, out_col, e);
        end
        pending--;
        if (exp_out.size() == 0 || exp_out[0] / 1000000 != e / 1000000) writes_done_pass = e / 1000000;
      end
      if (done) dones++;
    end
  end

  initial begin
    start = 0; prog = 0; img_w = 16; img_h = 16;
    prog_mem[0] = '0;
    prog_mem[1] = '0; prog_mem[1].dir = DIR_COL; prog_mem[1].level = 1; prog_mem[1].row_off = 1;
    prog_mem[2] = '0; prog_mem[2].dir = DIR_ROW; prog_mem[2].level = 2; prog_mem[2].row_off = 2;
    prog_mem[2].col_off = 3; prog_mem[2].last = 1;
    for (int k = 0; k < 3; k++) expected(k, prog_mem[k], 16, 16);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    prog = 2'd3; start = 1;
    @(negedge clk);
    start = 0;
    prog = 2'd0;
    checks++;
    if (prog_q != 2'd3 || !busy) begin
      failures++;
      $display("FAIL program not latched");
    end
    wait (done);
    @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (exp_in.size() != 0 || exp_out.size() != 0 || dones != 1 || busy) begin
      failures++;
      $display("FAIL end: %0d reads, %0d writes left, %0d done pulses", exp_in.size(), exp_out.size(), dones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
