// output_unit -- write interface between the PE array and the frame memory.
//
// Each low/high coefficient pair leaving the PE array is written back in
// place: the low-pass coefficient to the address of the pair's even sample
// (from the output address generator), the high-pass coefficient 2^level
// further along the line. The write is registered, so it reaches the frame
// memory one cycle after the pair leaves the array. Every pair advances
// the output address generator by one.
//
// Interface: pe_valid/pe_tok from the PE array (no back-pressure: the
// frame memory takes one two-sample write per cycle); ag_row/ag_col from
// the output AG, ag_step back to it; fm_wr_* to the frame memory.
// Its role follows the document; in-place write-back is this design's.
module output_unit
  import dwt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  dir_e               dir,
  input  logic [LEVEL_W-1:0] level,
  input  logic               pe_valid,
  input  token_t             pe_tok,
  input  logic               ag_valid,
  input  logic [ROW_W-1:0]   ag_row,
  input  logic [COL_W-1:0]   ag_col,
  output logic               ag_step,
  output logic               fm_wr_en,
  output logic [ROW_W-1:0]   fm_wr_row [2],
  output logic [COL_W-1:0]   fm_wr_col [2],
  output sample_t            fm_wr_data [2]
);

  assign ag_step = pe_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fm_wr_en <= 1'b0;
      for (int i = 0; i < 2; i++) begin
        fm_wr_row[i]  <= '0;
        fm_wr_col[i]  <= '0;
        fm_wr_data[i] <= '0;
      end
    end else begin
      fm_wr_en <= pe_valid;
      if (pe_valid) begin
        fm_wr_row[0]  <= ag_row;
        fm_wr_col[0]  <= ag_col;
        fm_wr_row[1]  <= (dir == DIR_COL) ? ag_row + (ROW_W'(1) << level) : ag_row;
        fm_wr_col[1]  <= (dir == DIR_ROW) ? ag_col + (COL_W'(1) << level) : ag_col;
        fm_wr_data[0] <= pe_tok.s;
        fm_wr_data[1] <= pe_tok.d;
      end
    end
  end

  a_addr_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 pe_valid |-> ag_valid);

endmodule
