// rdwt_table1_tb -- throughput of the engine for the kernel shapes of the
// prototype's performance table, run end to end on a 64x64 image with the
// one-level program.
//
//   kernel   steps  samples/cycle  MCU utilisation
//   (5,3)    2      2              100 %   (PLA context 0)
//   (9,3)    3      1               75 %   (RAM context, stand-in coefficients)
//   (9,7)    4      1              100 %   (PLA context 1)
//   (2,10)   4      1              100 %   (RAM context, stand-in coefficients)
//   (13,7)   4      1              100 %   (RAM context, stand-in coefficients)
//
// Only the step counts of (9,3), (2,10) and (13,7) are known here, so those
// rows use contexts with the right number and kind of steps but made-up
// coefficients; they measure the rate, and the result is still checked
// against the reference model. The rate is measured at the frame memory
// read port over each pass (two samples per read).
module rdwt_table1_tb;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W = 64, H = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  start, busy, done;
  logic [2:0]            filter_sel;
  logic [1:0]            prog_sel;
  logic [COL_W:0]        img_w;
  logic [ROW_W:0]        img_h;
  logic                  pe_ctx_we;
  logic [1:0]            pe_ctx_waddr;
  pe_ctx_t               pe_ctx_wdata;
  pass_t                 no_pass;
  logic                  fm_rd_en, fm_wr_en;
  logic [ROW_W-1:0]      fm_rd_row [2], fm_wr_row [2];
  logic [COL_W-1:0]      fm_rd_col [2], fm_wr_col [2];
  sample_t               fm_rd_data [2], fm_wr_data [2];

  int checks = 0, failures = 0;
  int reads, first_rd, last_rd, cyc;

  assign no_pass = '0;

  rdwt_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .filter_sel(filter_sel), .prog_sel(prog_sel),
    .img_w(img_w), .img_h(img_h), .pe_ctx_we(pe_ctx_we), .pe_ctx_waddr(pe_ctx_waddr),
    .pe_ctx_wdata(pe_ctx_wdata), .ag_ctx_we(1'b0), .ag_ctx_waddr('0),
    .ag_ctx_wdata(no_pass), .fm_rd_en(fm_rd_en), .fm_rd_row(fm_rd_row),
    .fm_rd_col(fm_rd_col), .fm_rd_data(fm_rd_data), .fm_wr_en(fm_wr_en),
    .fm_wr_row(fm_wr_row), .fm_wr_col(fm_wr_col), .fm_wr_data(fm_wr_data),
    .busy(busy), .done(done));

  frame_mem_model #(.ROWS(H), .COLS(W)) u_mem (
    .clk(clk), .rd_en(fm_rd_en), .rd_row(fm_rd_row), .rd_col(fm_rd_col), .rd_data(fm_rd_data),
    .wr_en(fm_wr_en), .wr_row(fm_wr_row), .wr_col(fm_wr_col), .wr_data(fm_wr_data));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first pass only: the row pass reads every pair of the image once
  always @(posedge clk) begin
    cyc++;
    if (rst_n && fm_rd_en && reads < W * H / 2) begin
      if (reads == 0) first_rd = cyc;
      last_rd = cyc;
      reads++;
    end
  end

  task automatic run(input string name, input int fsel, input pe_ctx_t ctx,
                     input int exp_spc_x2, input int exp_util);
    int img[];
    int spc_x2, util, span;
    if (fsel >= PE_PLA_ENTRIES) begin
      @(negedge clk);
      pe_ctx_we = 1; pe_ctx_waddr = 2'(fsel - PE_PLA_ENTRIES); pe_ctx_wdata = ctx;
      @(negedge clk);
      pe_ctx_we = 0;
    end
    img = new[W * H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        u_mem.mem[r][c] = sample_t'($urandom_range(0, 255));
        img[r * W + c] = int'(u_mem.mem[r][c]);
      end
    ref_pass(img, W, H, ag_pla(2'd0, 8'd0), ctx);
    ref_pass(img, W, H, ag_pla(2'd0, 8'd1), ctx);
    @(negedge clk);
    filter_sel = 3'(fsel);
    reads = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    @(negedge clk);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        checks++;
        if (int'(u_mem.mem[r][c]) != img[r * W + c]) begin
          failures++;
          if (failures < 10) $display("FAIL %s (%0d,%0d)", name, r, c);
        end
      end
    // samples per cycle x2 over the row pass, rounded to the nearest half
    span   = last_rd - first_rd + int'(ctx.fold);
    spc_x2 = (2 * 2 * reads + span / 2) / span;
    util   = 100 * int'(ctx.nsteps) / (2 * int'(ctx.fold));
    checks += 2;
    if (spc_x2 != exp_spc_x2) begin
      failures++;
      $display("FAIL %s: %0d samples in %0d cycles", name, 2 * reads, span);
    end
    if (util != exp_util) begin
      failures++;
      $display("FAIL %s: utilisation %0d%%", name, util);
    end
    $display("%-7s %0d steps: %0d samples in %0d cycles = %0d.%0d per cycle, utilisation %0d%%",
             name, ctx.nsteps, 2 * reads, span, spc_x2 / 2, 5 * (spc_x2 % 2), util);
  endtask

  initial begin
    pe_ctx_t k93, k210, k137;
    start = 0; filter_sel = 0; prog_sel = 2'd0; img_w = W; img_h = H; cyc = 0; reads = 0;
    pe_ctx_we = 0; pe_ctx_waddr = 0; pe_ctx_wdata = '0;
    k93 = '0; k93.fold = 2; k93.nsteps = 3;
    k93.steps[0] = mk_step(TGT_ODD,  MCU_ADD, -2048);
    k93.steps[1] = mk_step(TGT_EVEN, MCU_ADD,  1024);
    k93.steps[2] = mk_step(TGT_ODD,  MCU_ADD,   300);
    k210 = '0; k210.fold = 2; k210.nsteps = 4;
    k210.steps[0] = mk_step(TGT_ODD,  MCU_SINGLE, -4096);
    k210.steps[1] = mk_step(TGT_EVEN, MCU_SINGLE,  2048);
    k210.steps[2] = mk_step(TGT_ODD,  MCU_SUB,     1024);
    k210.steps[3] = mk_step(TGT_ODD,  MCU_SUB,     -200);
    k137 = '0; k137.fold = 2; k137.nsteps = 4;
    k137.steps[0] = mk_step(TGT_ODD,  MCU_ADD, -2304);
    k137.steps[1] = mk_step(TGT_EVEN, MCU_ADD,  1152);
    k137.steps[2] = mk_step(TGT_ODD,  MCU_ADD,   256);
    k137.steps[3] = mk_step(TGT_EVEN, MCU_ADD,  -128);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run("(5,3)",  0, pe_pla(3'd0), 4, 100);
    run("(9,3)",  2, k93,          2,  75);
    run("(9,7)",  1, pe_pla(3'd1), 2, 100);
    run("(2,10)", 3, k210,         2, 100);
    run("(13,7)", 4, k137,         2, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
