// input_unit -- read interface between the frame memory and the PE array.
//
// For every address the input address generator offers, the unit reads
// the sample pair from the frame memory: the even sample at (row, col) and
// the odd one 2^level further along the line (right for a row pass, down
// for a column pass). The frame memory answers one cycle after the read
// request. Returned pairs, tagged with the line-start and line-end flags
// of their address, go into a two-entry FIFO that feeds the PE array; a
// read is issued only when the FIFO is sure to have room, so the unit
// sustains one pair per cycle and follows a folded PE array that takes a
// pair only every second cycle.
//
// Interface: ag_valid/ag_row/ag_col/ag_first/ag_last from the input AG,
// ag_step back to it (one read issued); fm_rd_* to the frame memory, with
// fm_rd_data one cycle later; pe_valid/pe_ready/pe_tok to the PE array.
// Its role follows the document; the two-sample read port and the FIFO
// are this design's.
module input_unit
  import dwt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  dir_e                dir,
  input  logic [LEVEL_W-1:0]  level,
  input  logic                ag_valid,
  input  logic [ROW_W-1:0]    ag_row,
  input  logic [COL_W-1:0]    ag_col,
  input  logic                ag_first,
  input  logic                ag_last,
  output logic                ag_step,
  output logic                fm_rd_en,
  output logic [ROW_W-1:0]    fm_rd_row [2],
  output logic [COL_W-1:0]    fm_rd_col [2],
  input  sample_t             fm_rd_data [2],
  output logic                pe_valid,
  input  logic                pe_ready,
  output token_t              pe_tok
);

  localparam int DEPTH = 2;

  token_t     fifo [DEPTH];
  logic       wptr, rptr;
  logic [1:0] count;
  logic       inflight, inflight_first, inflight_last;
  logic       pop, push;
  logic [1:0] count_after_pop;

  assign pe_valid        = (count != 2'd0);
  assign pe_tok          = fifo[rptr];
  assign pop             = pe_valid && pe_ready;
  assign push            = inflight;
  assign count_after_pop = count - {1'b0, pop};
  assign ag_step         = ag_valid && (int'(count_after_pop) + int'(inflight) < DEPTH);
  assign fm_rd_en        = ag_step;

  always_comb begin
    fm_rd_row[0] = ag_row;
    fm_rd_col[0] = ag_col;
    fm_rd_row[1] = (dir == DIR_COL) ? ag_row + (ROW_W'(1) << level) : ag_row;
    fm_rd_col[1] = (dir == DIR_ROW) ? ag_col + (COL_W'(1) << level) : ag_col;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr           <= 1'b0;
      rptr           <= 1'b0;
      count          <= '0;
      inflight       <= 1'b0;
      inflight_first <= 1'b0;
      inflight_last  <= 1'b0;
      for (int i = 0; i < DEPTH; i++) fifo[i] <= '0;
    end else begin
      inflight       <= ag_step;
      inflight_first <= ag_first;
      inflight_last  <= ag_last;
      if (push) begin
        fifo[wptr] <= '{s: fm_rd_data[0], d: fm_rd_data[1],
                        first: inflight_first, last: inflight_last};
        wptr <= ~wptr;
      end
      if (pop) rptr <= ~rptr;
      count <= count + {1'b0, push} - {1'b0, pop};
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (count_after_pop < 2'(DEPTH)));

endmodule
