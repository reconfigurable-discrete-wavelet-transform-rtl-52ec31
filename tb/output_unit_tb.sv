// output_unit_tb -- checks that the Output Unit writes each coefficient
// pair in place: the low-pass value at the address of the pair, the
// high-pass value 2^level further along the line, one cycle after the pair
// arrives, and that it steps the output address generator once per pair.
module output_unit_tb;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dir_e               dir;
  logic [LEVEL_W-1:0] level;
  logic               pe_valid, ag_valid, ag_step, fm_wr_en;
  token_t             pe_tok;
  logic [ROW_W-1:0]   ag_row, fm_wr_row [2];
  logic [COL_W-1:0]   ag_col, fm_wr_col [2];
  sample_t            fm_wr_data [2];
  int checks = 0, failures = 0;

  output_unit dut (.clk(clk), .rst_n(rst_n), .dir(dir), .level(level), .pe_valid(pe_valid),
                   .pe_tok(pe_tok), .ag_valid(ag_valid), .ag_row(ag_row), .ag_col(ag_col),
                   .ag_step(ag_step), .fm_wr_en(fm_wr_en), .fm_wr_row(fm_wr_row),
                   .fm_wr_col(fm_wr_col), .fm_wr_data(fm_wr_data));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_valid = 0; ag_valid = 1; pe_tok = '0; ag_row = 0; ag_col = 0; dir = DIR_ROW; level = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int r, c, lv, s, d;
      bit v;
      @(negedge clk);
      v  = ($urandom_range(0, 3) != 0);
      r  = $urandom_range(0, 500); c = $urandom_range(0, 500); lv = $urandom_range(0, 4);
      s  = $urandom_range(0, 65535); d = $urandom_range(0, 65535);
      dir = dir_e'($urandom_range(0, 1)); level = LEVEL_W'(lv);
      ag_row = ROW_W'(r); ag_col = COL_W'(c);
      pe_tok.s = sample_t'(s); pe_tok.d = sample_t'(d); pe_valid = v;
      #1;
      checks++;
      if (ag_step != v) begin
        failures++;
        $display("FAIL ag_step");
      end
      @(posedge clk);
      #1;
      checks++;
      if (fm_wr_en != v) begin
        failures++;
        $display("FAIL wr_en");
      end else if (v) begin
        int r1, c1;
        r1 = (dir == DIR_COL) ? r + (1 << lv) : r;
        c1 = (dir == DIR_ROW) ? c + (1 << lv) : c;
        checks++;
        if (int'(fm_wr_row[0]) != r || int'(fm_wr_col[0]) != c || int'(fm_wr_row[1]) != r1 ||
            int'(fm_wr_col[1]) != c1 || fm_wr_data[0] != sample_t'(s) || fm_wr_data[1] != sample_t'(d)) begin
          failures++;
          $display("FAIL write %0d,%0d/%0d,%0d", fm_wr_row[0], fm_wr_col[0], fm_wr_row[1], fm_wr_col[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
