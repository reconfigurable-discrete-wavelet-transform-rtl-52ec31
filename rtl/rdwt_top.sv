// rdwt_top -- reconfigurable discrete wavelet transform engine.
//
// Computes multi-level 2-D wavelet transforms of an image held in an
// external frame memory, with the filter kernel and the decomposition
// structure chosen at run time. Data path: the Input Unit reads even/odd
// sample pairs from the frame memory, the PE array applies the lifting
// steps of the selected kernel, and the Output Unit writes the low/high
// coefficients back in place. The WPT address generator walks the pass
// program of the selected decomposition structure and produces the read
// and write addresses. The PE context memory holds the kernels, the AG
// context memory the decomposition programs; both have fixed default
// entries and user-writable RAM entries.
//
// Operation: write any RAM contexts, set filter_sel, prog_sel, img_w and
// img_h, pulse start for one cycle. The PE array is reconfigured in that
// cycle and the program runs; busy stays high until the one-cycle done
// pulse. img_w and img_h must be multiples of 2^(levels) so that every
// line has an even length. Throughput: one pair (two samples) per cycle
// for unfolded kernels such as (5,3), one pair per two cycles for folded
// ones such as (9,7); every pass adds a few cycles to drain the pipeline.
//
// Frame memory: fm_rd_en requests the two samples at fm_rd_row/col[0] and
// [1], which must arrive on fm_rd_data one cycle later; fm_wr_en writes
// fm_wr_data[0..1] to fm_wr_row/col[0..1] at the clock edge.
// The block structure follows the document; interfaces, sizes and the
// in-place coefficient layout are this design's choices.
module rdwt_top
  import dwt_pkg::*;
#(
  parameter int NUM_PE       = dwt_pkg::C_NUM_PE,
  parameter int FOLD_MAX     = dwt_pkg::C_FOLD_MAX,
  parameter int PE_RAM_DEPTH = 4,
  parameter int AG_RAM_DEPTH = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [2:0]            filter_sel,
  input  logic [1:0]            prog_sel,
  input  logic [COL_W:0]        img_w,
  input  logic [ROW_W:0]        img_h,
  // context RAM write ports
  input  logic                  pe_ctx_we,
  input  logic [1:0]            pe_ctx_waddr,
  input  pe_ctx_t               pe_ctx_wdata,
  input  logic                  ag_ctx_we,
  input  logic [PASS_IDX_W-1:0] ag_ctx_waddr,
  input  pass_t                 ag_ctx_wdata,
  // frame memory
  output logic                  fm_rd_en,
  output logic [ROW_W-1:0]      fm_rd_row [2],
  output logic [COL_W-1:0]      fm_rd_col [2],
  input  sample_t               fm_rd_data [2],
  output logic                  fm_wr_en,
  output logic [ROW_W-1:0]      fm_wr_row [2],
  output logic [COL_W-1:0]      fm_wr_col [2],
  output sample_t               fm_wr_data [2],
  // status
  output logic                  busy,
  output logic                  done
);

  pe_ctx_t               ctx;
  pass_t                 pass;
  logic [1:0]            prog_q;
  logic [PASS_IDX_W-1:0] pass_idx;
  dir_e                  cur_dir;
  logic [LEVEL_W-1:0]    cur_level;
  logic                  go;

  logic             in_valid, in_first, in_last, in_step;
  logic [ROW_W-1:0] in_row;
  logic [COL_W-1:0] in_col;
  logic             out_valid, out_step;
  logic [ROW_W-1:0] out_row;
  logic [COL_W-1:0] out_col;

  logic   pe_in_valid, pe_in_ready, pe_out_valid;
  token_t pe_in_tok, pe_out_tok;

  logic   ag_busy;

  assign go   = start && !ag_busy;
  assign busy = ag_busy;

  pe_context_memory #(.RAM_DEPTH(PE_RAM_DEPTH)) u_pe_ctx (
    .clk  (clk),
    .rst_n(rst_n),
    .sel  (filter_sel),
    .ctx  (ctx),
    .we   (pe_ctx_we),
    .waddr(pe_ctx_waddr),
    .wdata(pe_ctx_wdata)
  );

  ag_context_memory #(.RAM_DEPTH(AG_RAM_DEPTH)) u_ag_ctx (
    .clk  (clk),
    .rst_n(rst_n),
    .prog (prog_q),
    .idx  (pass_idx),
    .pass (pass),
    .we   (ag_ctx_we),
    .waddr(ag_ctx_waddr),
    .wdata(ag_ctx_wdata)
  );

  wpt_ag u_ag (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (go),
    .prog     (prog_sel),
    .img_w    (img_w),
    .img_h    (img_h),
    .prog_q   (prog_q),
    .pass_idx (pass_idx),
    .pass     (pass),
    .cur_dir  (cur_dir),
    .cur_level(cur_level),
    .busy     (ag_busy),
    .done     (done),
    .in_valid (in_valid),
    .in_row   (in_row),
    .in_col   (in_col),
    .in_first (in_first),
    .in_last  (in_last),
    .in_step  (in_step),
    .out_valid(out_valid),
    .out_row  (out_row),
    .out_col  (out_col),
    .out_step (out_step)
  );

  input_unit u_in (
    .clk       (clk),
    .rst_n     (rst_n),
    .dir       (cur_dir),
    .level     (cur_level),
    .ag_valid  (in_valid),
    .ag_row    (in_row),
    .ag_col    (in_col),
    .ag_first  (in_first),
    .ag_last   (in_last),
    .ag_step   (in_step),
    .fm_rd_en  (fm_rd_en),
    .fm_rd_row (fm_rd_row),
    .fm_rd_col (fm_rd_col),
    .fm_rd_data(fm_rd_data),
    .pe_valid  (pe_in_valid),
    .pe_ready  (pe_in_ready),
    .pe_tok    (pe_in_tok)
  );

  dwt_pe_array #(.NUM_PE(NUM_PE), .FOLD_MAX(FOLD_MAX)) u_pe_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_load (go),
    .ctx      (ctx),
    .in_valid (pe_in_valid),
    .in_ready (pe_in_ready),
    .in_tok   (pe_in_tok),
    .out_valid(pe_out_valid),
    .out_tok  (pe_out_tok)
  );

  output_unit u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .dir       (cur_dir),
    .level     (cur_level),
    .pe_valid  (pe_out_valid),
    .pe_tok    (pe_out_tok),
    .ag_valid  (out_valid),
    .ag_row    (out_row),
    .ag_col    (out_col),
    .ag_step   (out_step),
    .fm_wr_en  (fm_wr_en),
    .fm_wr_row (fm_wr_row),
    .fm_wr_col (fm_wr_col),
    .fm_wr_data(fm_wr_data)
  );

endmodule
