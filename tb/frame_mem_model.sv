// frame_mem_model -- behavioural model of the external frame memory.
//
// Not part of the design: the engine only defines the port. Two read
// ports with one cycle of latency (both addresses are given together with
// rd_en) and two write ports that write at the clock edge. Addresses are
// row/column; the store is a ROWS x COLS array of 16-bit samples that a
// testbench loads and inspects through the mem array directly.
module frame_mem_model
  import dwt_pkg::*;
#(
  parameter int ROWS = 64,
  parameter int COLS = 64
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [ROW_W-1:0] rd_row [2],
  input  logic [COL_W-1:0] rd_col [2],
  output sample_t          rd_data [2],
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row [2],
  input  logic [COL_W-1:0] wr_col [2],
  input  sample_t          wr_data [2]
);

  sample_t mem [ROWS][COLS];

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) mem[r][c] = '0;
    rd_data[0] = '0;
    rd_data[1] = '0;
  end

  always @(posedge clk) begin
    if (rd_en) begin
      for (int i = 0; i < 2; i++)
        rd_data[i] <= (int'(rd_row[i]) < ROWS && int'(rd_col[i]) < COLS) ?
                      mem[rd_row[i]][rd_col[i]] : sample_t'(16'h7fff);
    end
    if (wr_en) begin
      for (int i = 0; i < 2; i++)
        if (int'(wr_row[i]) < ROWS && int'(wr_col[i]) < COLS)
          mem[wr_row[i]][wr_col[i]] <= wr_data[i];
    end
  end

endmodule
