// input_unit_tb -- checks the Input Unit against a frame memory model
// holding a known pattern: every pair handed to the PE array must carry
// the two samples at the address and 2^level further along the line, with
// the address's line flags, in order, with nothing lost or repeated while
// the PE side stalls at random. With the PE side always ready it must
// deliver one pair per cycle.
module input_unit_tb;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dir_e               dir;
  logic [LEVEL_W-1:0] level;
  logic               ag_valid, ag_first, ag_last, ag_step, fm_rd_en, pe_valid, pe_ready;
  logic [ROW_W-1:0]   ag_row;
  logic [COL_W-1:0]   ag_col;
  logic [ROW_W-1:0]   fm_rd_row [2], fm_wr_row [2];
  logic [COL_W-1:0]   fm_rd_col [2], fm_wr_col [2];
  sample_t            fm_rd_data [2], fm_wr_data [2];
  token_t             pe_tok;

  typedef struct { int r; int c; bit f; bit l; } addr_t;
  addr_t addr_q[$], exp_q[$];
  int checks = 0, failures = 0;
  bit always_ready;
  int first_cyc, last_cyc, cyc, got;

  assign fm_wr_row[0] = '0; assign fm_wr_row[1] = '0;
  assign fm_wr_col[0] = '0; assign fm_wr_col[1] = '0;
  assign fm_wr_data[0] = '0; assign fm_wr_data[1] = '0;

  frame_mem_model #(.ROWS(32), .COLS(32)) u_mem (
    .clk(clk), .rd_en(fm_rd_en), .rd_row(fm_rd_row), .rd_col(fm_rd_col), .rd_data(fm_rd_data),
    .wr_en(1'b0), .wr_row(fm_wr_row), .wr_col(fm_wr_col), .wr_data(fm_wr_data));

  input_unit dut (
    .clk(clk), .rst_n(rst_n), .dir(dir), .level(level), .ag_valid(ag_valid), .ag_row(ag_row),
    .ag_col(ag_col), .ag_first(ag_first), .ag_last(ag_last), .ag_step(ag_step),
    .fm_rd_en(fm_rd_en), .fm_rd_row(fm_rd_row), .fm_rd_col(fm_rd_col), .fm_rd_data(fm_rd_data),
    .pe_valid(pe_valid), .pe_ready(pe_ready), .pe_tok(pe_tok));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pattern(input int r, input int c);
    return r * 97 + c * 3 - 500;
  endfunction

  // address source and PE sink
  always_comb begin
    ag_valid = addr_q.size() > 0;
    ag_row   = ag_valid ? ROW_W'(addr_q[0].r) : '0;
    ag_col   = ag_valid ? COL_W'(addr_q[0].c) : '0;
    ag_first = ag_valid ? addr_q[0].f : 1'b0;
    ag_last  = ag_valid ? addr_q[0].l : 1'b0;
  end
  always @(negedge clk) pe_ready = always_ready || ($urandom_range(0, 2) == 0);

  always @(posedge clk) begin
    cyc++;
    if (rst_n && ag_step) void'(addr_q.pop_front());
    if (rst_n && pe_valid && pe_ready) begin
      addr_t e;
      int r1, c1;
      checks++;
      e = exp_q.pop_front();
      r1 = (dir == DIR_COL) ? e.r + (1 << level) : e.r;
      c1 = (dir == DIR_ROW) ? e.c + (1 << level) : e.c;
      if (int'(pe_tok.s) != pattern(e.r, e.c) || int'(pe_tok.d) != pattern(r1, c1) ||
          pe_tok.first != e.f || pe_tok.last != e.l) begin
        failures++;
        $display("FAIL pair at %0d,%0d: s=%0d d=%0d", e.r, e.c, pe_tok.s, pe_tok.d);
      end
      if (got == 0) first_cyc = cyc;
      last_cyc = cyc;
      got++;
    end
  end

  task automatic run(input dir_e d, input int lvl, input bit rdy);
    int stride;
    stride = 1 << lvl;
    @(negedge clk);
    dir = d; level = LEVEL_W'(lvl); always_ready = rdy; got = 0;
    for (int l = 0; l < 4; l++)
      for (int p = 0; p < 32 / (2 * stride); p++) begin
        addr_t a;
        if (d == DIR_ROW) begin a.r = l * stride; a.c = 2 * p * stride; end
        else begin a.c = l * stride; a.r = 2 * p * stride; end
        a.f = (p == 0); a.l = (p == 32 / (2 * stride) - 1);
        addr_q.push_back(a);
        exp_q.push_back(a);
      end
    wait (exp_q.size() == 0);
    @(negedge clk);
    if (rdy) begin
      checks++;
      if (last_cyc - first_cyc != got - 1) begin
        failures++;
        $display("FAIL %0d pairs took %0d cycles", got, last_cyc - first_cyc + 1);
      end
    end
  endtask

  initial begin
    dir = DIR_ROW; level = 0; always_ready = 1; cyc = 0; got = 0;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) u_mem.mem[r][c] = sample_t'(pattern(r, c));
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(DIR_ROW, 0, 1);
    run(DIR_COL, 1, 1);
    run(DIR_ROW, 2, 0);
    run(DIR_COL, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
