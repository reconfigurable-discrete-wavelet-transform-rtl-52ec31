// wpt_ag -- reconfigurable wavelet packet transform address generator.
//
// Holds the input address generator (read addresses for the Input Unit)
// and the output address generator (write addresses for the Output Unit),
// and a pass sequencer that walks through the decomposition program in the
// AG context memory. For every pass descriptor the sequencer starts both
// generators in the same cycle; the input generator then advances on each
// read the Input Unit issues, the output generator on each coefficient pair
// the PE array delivers. When the output generator has finished, the
// sequencer waits two cycles so that the last write has reached the frame
// memory, then loads the next descriptor, or ends with a one-cycle done
// pulse after a descriptor marked last.
//
// Interface: start (one cycle) with prog selects the program; pass_idx
// addresses the context memory, which answers combinationally on pass.
// cur_dir/cur_level describe the running pass for the I/O units.
// The two generators follow the document; the sequencer is this design's
// way of stepping through the context.
module wpt_ag
  import dwt_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [1:0]            prog,
  input  logic [COL_W:0]        img_w,
  input  logic [ROW_W:0]        img_h,
  output logic [1:0]            prog_q,
  output logic [PASS_IDX_W-1:0] pass_idx,
  input  pass_t                 pass,
  output dir_e                  cur_dir,
  output logic [LEVEL_W-1:0]    cur_level,
  output logic                  busy,
  output logic                  done,
  // input address generator
  output logic                  in_valid,
  output logic [ROW_W-1:0]      in_row,
  output logic [COL_W-1:0]      in_col,
  output logic                  in_first,
  output logic                  in_last,
  input  logic                  in_step,
  // output address generator
  output logic                  out_valid,
  output logic [ROW_W-1:0]      out_row,
  output logic [COL_W-1:0]      out_col,
  input  logic                  out_step
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_GAP1, S_GAP2} seq_e;

  seq_e  state;
  logic  ag_start;
  logic  last_q;
  logic  in_busy, out_busy;
  logic  in_pass_last, out_first, out_last, out_pass_last;

  assign ag_start = (state == S_LOAD);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      prog_q    <= '0;
      pass_idx  <= '0;
      cur_dir   <= DIR_ROW;
      cur_level <= '0;
      last_q    <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          prog_q   <= prog;
          pass_idx <= '0;
          state    <= S_LOAD;
        end
        S_LOAD: begin
          cur_dir   <= pass.dir;
          cur_level <= pass.level;
          last_q    <= pass.last;
          state     <= S_RUN;
        end
        S_RUN:  if (!out_busy) state <= S_GAP1;
        S_GAP1: state <= S_GAP2;
        S_GAP2: begin
          if (last_q) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            pass_idx <= pass_idx + 1'b1;
            state    <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  addr_gen u_in_ag (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (ag_start),
    .pass     (pass),
    .img_w    (img_w),
    .img_h    (img_h),
    .step     (in_step),
    .valid    (in_valid),
    .busy     (in_busy),
    .row      (in_row),
    .col      (in_col),
    .first    (in_first),
    .last     (in_last),
    .pass_last(in_pass_last)
  );

  addr_gen u_out_ag (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (ag_start),
    .pass     (pass),
    .img_w    (img_w),
    .img_h    (img_h),
    .step     (out_step),
    .valid    (out_valid),
    .busy     (out_busy),
    .row      (out_row),
    .col      (out_col),
    .first    (out_first),
    .last     (out_last),
    .pass_last(out_pass_last)
  );

  // every coefficient pair written must have an address
  a_out_addr: assert property (@(posedge clk) disable iff (!rst_n)
                               out_step |-> out_valid);
  // the reads of a pass end before its writes
  a_in_first: assert property (@(posedge clk) disable iff (!rst_n)
                               (state == S_GAP1) |-> !in_busy);

endmodule
