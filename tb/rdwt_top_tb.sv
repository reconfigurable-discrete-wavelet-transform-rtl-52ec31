// rdwt_top_tb -- end-to-end test of the reconfigurable DWT engine on a
// 32x32 image in a frame memory model.
//
// Five transforms in a row, each checked coefficient by coefficient against
// the reference model applied pass by pass:
//   (5,3), one level                   (PLA kernel, PLA program, unfolded)
//   (5,3), three-level dyadic
//   (9,7), four-level full packet      (folded by two)
//   three-step kernel from the RAM, irregular packet tree from the RAM
//   (5,3), one level again             (switch back)
// Each run's cycle count must lie between the ideal pairs*fold and that
// plus a small per-pass drain allowance. The mechanisms of the design are
// counted and each must occur: unfolded and folded operation, PE array
// stall of the Input Unit, line-end boundary extension, row and column
// passes, RAM contexts, reconfiguration between transforms.
module rdwt_top_tb;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W = 32, H = 32;
  localparam int PASS_OVH = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  start, busy, done;
  logic [2:0]            filter_sel;
  logic [1:0]            prog_sel;
  logic [COL_W:0]        img_w;
  logic [ROW_W:0]        img_h;
  logic                  pe_ctx_we, ag_ctx_we;
  logic [1:0]            pe_ctx_waddr;
  pe_ctx_t               pe_ctx_wdata;
  logic [PASS_IDX_W-1:0] ag_ctx_waddr;
  pass_t                 ag_ctx_wdata;
  logic                  fm_rd_en, fm_wr_en;
  logic [ROW_W-1:0]      fm_rd_row [2], fm_wr_row [2];
  logic [COL_W-1:0]      fm_rd_col [2], fm_wr_col [2];
  sample_t               fm_rd_data [2], fm_wr_data [2];

  int checks = 0, failures = 0;
  int n_unfolded = 0, n_folded = 0, n_stall = 0, n_line_end = 0, n_row = 0, n_col = 0;
  int n_ram_ctx = 0, n_reconfig = 0;

  rdwt_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .filter_sel(filter_sel), .prog_sel(prog_sel),
    .img_w(img_w), .img_h(img_h), .pe_ctx_we(pe_ctx_we), .pe_ctx_waddr(pe_ctx_waddr),
    .pe_ctx_wdata(pe_ctx_wdata), .ag_ctx_we(ag_ctx_we), .ag_ctx_waddr(ag_ctx_waddr),
    .ag_ctx_wdata(ag_ctx_wdata), .fm_rd_en(fm_rd_en), .fm_rd_row(fm_rd_row),
    .fm_rd_col(fm_rd_col), .fm_rd_data(fm_rd_data), .fm_wr_en(fm_wr_en),
    .fm_wr_row(fm_wr_row), .fm_wr_col(fm_wr_col), .fm_wr_data(fm_wr_data),
    .busy(busy), .done(done));

  frame_mem_model #(.ROWS(H), .COLS(W)) u_mem (
    .clk(clk), .rd_en(fm_rd_en), .rd_row(fm_rd_row), .rd_col(fm_rd_col), .rd_data(fm_rd_data),
    .wr_en(fm_wr_en), .wr_row(fm_wr_row), .wr_col(fm_wr_col), .wr_data(fm_wr_data));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed at the block boundaries inside the top
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_pe_array.in_valid && !dut.u_pe_array.in_ready) n_stall++;
      if (dut.u_pe_array.in_valid && dut.u_pe_array.in_ready && dut.u_pe_array.in_tok.last)
        n_line_end++;
      if (dut.u_ag.state == dut.u_ag.S_LOAD) begin
        if (dut.pass.dir == DIR_ROW) n_row++; else n_col++;
      end
    end
  end

  pass_t ram_prog [$];

  task automatic run(input string name, input int fsel, input int psel);
    int img[];
    int cyc, passes, pairs_fold, fold, i;
    pe_ctx_t ctx;
    pass_t   p;
    // reference
    img = new[W * H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        u_mem.mem[r][c] = sample_t'($urandom_range(0, 255));
        img[r * W + c] = int'(u_mem.mem[r][c]);
      end
    @(negedge clk);
    filter_sel = 3'(fsel);
    prog_sel   = 2'(psel);
    #1 ctx = dut.ctx;
    fold = int'(ctx.fold);
    if (fold == 1) n_unfolded++; else n_folded++;
    if (fsel >= PE_PLA_ENTRIES) n_ram_ctx++;
    passes = 0; pairs_fold = 0; i = 0;
    do begin
      p = (psel < AG_PLA_PROGS) ? ag_pla(2'(psel), PASS_IDX_W'(i)) : ram_prog[i];
      ref_pass(img, W, H, p, ctx);
      pairs_fold += fold * ((W >> int'(p.level)) * (H >> int'(p.level)) / 2);
      passes++;
      i++;
    end while (!p.last);
    // run
    start = 1;
    @(negedge clk);
    start = 0;
    n_reconfig++;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        checks++;
        if (int'(u_mem.mem[r][c]) != img[r * W + c]) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s: (%0d,%0d) = %0d, expected %0d", name, r, c, u_mem.mem[r][c], img[r * W + c]);
        end
      end
    checks++;
    if (cyc < pairs_fold || cyc > pairs_fold + passes * PASS_OVH) begin
      failures++;
      $display("FAIL %s: %0d cycles, ideal %0d for %0d passes", name, cyc, pairs_fold, passes);
    end
    $display("%s: %0d passes, %0d cycles (ideal %0d)", name, passes, cyc, pairs_fold);
  endtask

  task automatic count_check(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end else $display("mechanism %s: %0d", what, n);
  endtask

  initial begin
    pe_ctx_t c3;
    pass_t   p;
    start = 0; filter_sel = 0; prog_sel = 0; img_w = W; img_h = H;
    pe_ctx_we = 0; pe_ctx_waddr = 0; pe_ctx_wdata = '0;
    ag_ctx_we = 0; ag_ctx_waddr = 0; ag_ctx_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    run("(5,3) one level", 0, 0);
    run("(5,3) three-level dyadic", 0, 1);
    run("(9,7) four-level packet", 1, 2);

    // RAM kernel: three steps, subtract and single-input modes
    c3 = '0; c3.fold = 2; c3.nsteps = 3;
    c3.steps[0] = mk_step(TGT_ODD, MCU_SINGLE, -4096);
    c3.steps[1] = mk_step(TGT_EVEN, MCU_SINGLE, 2048);
    c3.steps[2] = mk_step(TGT_ODD, MCU_SUB, 1024);
    @(negedge clk);
    pe_ctx_we = 1; pe_ctx_waddr = 2'd1; pe_ctx_wdata = c3;
    @(negedge clk);
    pe_ctx_we = 0;
    // RAM program: level 0; level 1 on LL and HH; level 2 on the LL of LL
    ram_prog = {};
    p = '0;                                           ram_prog.push_back(p);
    p.dir = DIR_COL;                                  ram_prog.push_back(p);
    p = '0; p.level = 1;                              ram_prog.push_back(p);
    p.dir = DIR_COL;                                  ram_prog.push_back(p);
    p = '0; p.level = 1; p.row_off = 1; p.col_off = 1; ram_prog.push_back(p);
    p.dir = DIR_COL;                                  ram_prog.push_back(p);
    p = '0; p.level = 2;                              ram_prog.push_back(p);
    p.dir = DIR_COL; p.last = 1;                      ram_prog.push_back(p);
    foreach (ram_prog[i]) begin
      @(negedge clk);
      ag_ctx_we = 1; ag_ctx_waddr = PASS_IDX_W'(i); ag_ctx_wdata = ram_prog[i];
      @(negedge clk);
      ag_ctx_we = 0;
    end
    run("RAM kernel, RAM packet tree", 3, 3);
    run("(5,3) one level again", 0, 0);

    count_check("unfolded kernel", n_unfolded);
    count_check("folded kernel", n_folded);
    count_check("PE array stall", n_stall);
    count_check("line-end boundary extension", n_line_end);
    count_check("row pass", n_row);
    count_check("column pass", n_col);
    count_check("RAM context", n_ram_ctx);
    count_check("reconfiguration", n_reconfig > 1 ? n_reconfig : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
