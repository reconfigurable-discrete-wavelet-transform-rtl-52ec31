// addr_gen -- one address generator of the reconfigurable WPT AG.
//
// Two FSM/counter pairs and a Mux. FSM0 with counter 0 walks along the
// current line, one sample pair per step, so counter 0 advances by twice
// the sample distance 2^level. FSM1 with counter 1 walks across the lines
// of the subband, advancing by 2^level. The initial values of both
// counters are the subband offsets from the pass descriptor, and the Mux
// sends counter 1 to Row_Address and counter 0 to Col_Address for a row
// pass, and the other way round for a column pass. The address is that of
// the even sample of the pair; the odd sample lies 2^level further along
// the line.
//
// Interface: start (one cycle) latches the pass descriptor and the image
// size and starts both FSMs. While valid is high, row/col/first/last
// describe the current pair; step advances to the next one. After the
// last pair of the last line both FSMs return to idle (busy low).
// The line length is img_w >> level for a row pass and img_h >> level for
// a column pass and must be even; the line count is the other dimension.
// The counters, FSMs and Mux follow the document; starting on an event
// rather than a fixed time slot is this design's choice, because the PE
// latency depends on the filter.
module addr_gen
  import dwt_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  pass_t            pass,
  input  logic [COL_W:0]   img_w,
  input  logic [ROW_W:0]   img_h,
  input  logic             step,
  output logic             valid,
  output logic             busy,
  output logic [ROW_W-1:0] row,
  output logic [COL_W-1:0] col,
  output logic             first,
  output logic             last,
  output logic             pass_last
);

  localparam int AW = (ROW_W > COL_W) ? ROW_W : COL_W;

  typedef enum logic {F_IDLE = 1'b0, F_RUN = 1'b1} fsm_e;

  fsm_e          fsm0, fsm1;
  dir_e          dir_q;
  logic [AW-1:0] cnt0, cnt1;          // counter 0 (along line), counter 1 (lines)
  logic [AW-1:0] init0;               // counter 0 initial value
  logic [AW-1:0] stride;              // 2^level
  logic [AW:0]   pairs, lines;        // per pass
  logic [AW:0]   pcnt, lcnt;

  logic [AW:0]   len_row, len_col;
  assign len_row = (AW+1)'(img_w >> pass.level);
  assign len_col = (AW+1)'(img_h >> pass.level);

  assign valid     = (fsm0 == F_RUN);
  assign busy      = (fsm1 == F_RUN);
  assign first     = (pcnt == '0);
  assign last      = (pcnt == pairs - 1'b1);
  assign pass_last = last && (lcnt == lines - 1'b1);

  // Mux: counters to row / column address
  always_comb begin
    if (dir_q == DIR_ROW) begin
      row = ROW_W'(cnt1);
      col = COL_W'(cnt0);
    end else begin
      row = ROW_W'(cnt0);
      col = COL_W'(cnt1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm0   <= F_IDLE;
      fsm1   <= F_IDLE;
      dir_q  <= DIR_ROW;
      cnt0   <= '0;
      cnt1   <= '0;
      init0  <= '0;
      stride <= '0;
      pairs  <= '0;
      lines  <= '0;
      pcnt   <= '0;
      lcnt   <= '0;
    end else if (start) begin
      fsm0   <= F_RUN;
      fsm1   <= F_RUN;
      dir_q  <= pass.dir;
      stride <= AW'(1) << pass.level;
      pcnt   <= '0;
      lcnt   <= '0;
      if (pass.dir == DIR_ROW) begin
        init0 <= AW'(pass.col_off);
        cnt0  <= AW'(pass.col_off);
        cnt1  <= AW'(pass.row_off);
        pairs <= len_row >> 1;
        lines <= len_col;
      end else begin
        init0 <= AW'(pass.row_off);
        cnt0  <= AW'(pass.row_off);
        cnt1  <= AW'(pass.col_off);
        pairs <= len_col >> 1;
        lines <= len_row;
      end
    end else if (valid && step) begin
      if (last) begin
        // FSM0: end of line, rewind counter 0; FSM1: next line or finish
        pcnt <= '0;
        cnt0 <= init0;
        if (lcnt == lines - 1'b1) begin
          fsm0 <= F_IDLE;
          fsm1 <= F_IDLE;
        end else begin
          lcnt <= lcnt + 1'b1;
          cnt1 <= cnt1 + stride;
        end
      end else begin
        pcnt <= pcnt + 1'b1;
        cnt0 <= cnt0 + (stride << 1);
      end
    end
  end

endmodule
