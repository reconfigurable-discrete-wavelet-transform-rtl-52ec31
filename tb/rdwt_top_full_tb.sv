// rdwt_top_full_tb -- full-size run of the DWT engine at its default
// parameters: one CCIR 601 frame (720x576) through the four-level full
// wavelet packet program with the (5,3) kernel, 170 passes in all.
// Every coefficient is compared with the reference model, and the cycle
// count must fit the frame period of 30 frames/s at a 50 MHz clock
// (1,666,666 cycles), i.e. the 100 Msample/s rate of the unfolded kernel.
module rdwt_top_full_tb;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W = 720, H = 576;
  localparam int FRAME_CYCLES = 50_000_000 / 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  start, busy, done;
  logic [2:0]            filter_sel;
  logic [1:0]            prog_sel;
  logic [COL_W:0]        img_w;
  logic [ROW_W:0]        img_h;
  logic                  fm_rd_en, fm_wr_en;
  logic [ROW_W-1:0]      fm_rd_row [2], fm_wr_row [2];
  logic [COL_W-1:0]      fm_rd_col [2], fm_wr_col [2];
  sample_t               fm_rd_data [2], fm_wr_data [2];
  pe_ctx_t               no_ctx;
  pass_t                 no_pass;

  int checks = 0, failures = 0;

  assign no_ctx  = '0;
  assign no_pass = '0;

  rdwt_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .filter_sel(filter_sel), .prog_sel(prog_sel),
    .img_w(img_w), .img_h(img_h), .pe_ctx_we(1'b0), .pe_ctx_waddr(2'd0),
    .pe_ctx_wdata(no_ctx), .ag_ctx_we(1'b0), .ag_ctx_waddr('0),
    .ag_ctx_wdata(no_pass), .fm_rd_en(fm_rd_en), .fm_rd_row(fm_rd_row),
    .fm_rd_col(fm_rd_col), .fm_rd_data(fm_rd_data), .fm_wr_en(fm_wr_en),
    .fm_wr_row(fm_wr_row), .fm_wr_col(fm_wr_col), .fm_wr_data(fm_wr_data),
    .busy(busy), .done(done));

  frame_mem_model #(.ROWS(H), .COLS(W)) u_mem (
    .clk(clk), .rd_en(fm_rd_en), .rd_row(fm_rd_row), .rd_col(fm_rd_col), .rd_data(fm_rd_data),
    .wr_en(fm_wr_en), .wr_row(fm_wr_row), .wr_col(fm_wr_col), .wr_data(fm_wr_data));

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img[];
    int cyc, i, bad;
    pass_t p;
    start = 0; filter_sel = 3'd0; prog_sel = 2'd2; img_w = W; img_h = H;
    img = new[W * H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        u_mem.mem[r][c] = sample_t'($urandom_range(0, 255));
        img[r * W + c] = int'(u_mem.mem[r][c]);
      end
    i = 0;
    do begin
      p = ag_pla(2'd2, PASS_IDX_W'(i));
      ref_pass(img, W, H, p, pe_pla(3'd0));
      i++;
    end while (!p.last);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    bad = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        checks++;
        if (int'(u_mem.mem[r][c]) != img[r * W + c]) begin
          failures++;
          if (bad++ < 10)
            $display("FAIL (%0d,%0d) = %0d, expected %0d", r, c, u_mem.mem[r][c], img[r * W + c]);
        end
      end
    checks++;
    if (cyc > FRAME_CYCLES) begin
      failures++;
      $display("FAIL %0d cycles exceed the frame period of %0d cycles", cyc, FRAME_CYCLES);
    end
    $display("720x576 four-level packet (5,3): %0d passes, %0d cycles (%0d allowed)", i, cyc, FRAME_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
