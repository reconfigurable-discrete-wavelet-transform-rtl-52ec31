// dwt_pe -- one reconfigurable lifting DWT processing element.
//
// The PE owns one MCU and executes up to FOLD_MAX lifting steps on each
// sample pair by time multiplexing (folding). A phase FSM counts
// 0..fold-1; in phase k the operand Mux feeds the MCU with the operands of
// step k, and the result goes either to the feedback register (delay
// chain 0), where step k+1 picks it up in the next phase, or, after the
// PE's last step, to the output register. A new pair is taken only in
// phase 0, so the PE accepts one pair every `fold` cycles.
//
// Each step keeps its own lifting registers: delay chain 1 holds even
// samples, delay chain 2 odd samples.
//  - Predict step (TGT_ODD), d[n] += alpha*(s[n] op s[n+1]): pair n is held
//    until pair n+1 brings s[n+1]. Then pair n leaves. At the end of a line
//    the held pair leaves in the next firing slot with s[n+1] replaced by
//    s[n] (symmetric extension); this slot is always free, because the
//    first pair of the next line produces nothing when it arrives.
//  - Update step (TGT_EVEN), s[n] += alpha*(d[n-1] op d[n]): d[n-1] is kept
//    in a register and d[-1] is taken as d[0] on the first pair of a line.
//  - MCU_SINGLE uses the same-index sample, s[n] or d[n].
// With zero steps the PE passes pairs through its output register.
//
// Interface: cfg_load latches fold, step count and steps (the decoded PE
// context) and clears all state; in_valid/in_ready/in_tok is a
// valid/ready input; out_valid/out_tok has no back-pressure. The PE that
// follows must run the same fold with the same phase, which the array
// guarantees by loading all PEs in the same cycle.
// Latency: the pair leaves one cycle after its last step; a predict step
// adds one pair interval of waiting for the next pair.
// The structure (three delay chains, Mux, MCU, FSM) follows the document;
// the scheduling, the boundary rule and the handshake are this design's.
module dwt_pe
  import dwt_pkg::*;
#(
  parameter int FOLD_MAX  = dwt_pkg::C_FOLD_MAX,
  parameter int COEF_FRAC = dwt_pkg::C_COEF_FRAC
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cfg_load,
  input  logic [1:0]                   cfg_fold,
  input  logic [1:0]                   cfg_nsteps,
  input  lift_step_t [FOLD_MAX-1:0]    cfg_steps,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  token_t                       in_tok,
  output logic                         out_valid,
  output token_t                       out_tok
);

  localparam int PW = (FOLD_MAX > 1) ? $clog2(FOLD_MAX) : 1;

  // ---- FSM: configuration and phase ----
  logic [1:0]                fold_q, nsteps_q;
  lift_step_t [FOLD_MAX-1:0] steps_q;
  logic [PW-1:0]             phase;

  // ---- delay chain 0: feedback register ----
  logic   fb_valid;
  token_t fb_tok;

  // ---- delay chains 1 and 2: lifting registers of every step ----
  logic    hold_v     [FOLD_MAX];
  sample_t hold_s     [FOLD_MAX];   // chain 1 (even)
  sample_t hold_d     [FOLD_MAX];   // chain 2 (odd)
  logic    hold_first [FOLD_MAX];
  logic    hold_last  [FOLD_MAX];
  sample_t prev_d     [FOLD_MAX];   // chain 2 (odd, previous pair)

  // ---- Mux and MCU ----
  lift_step_t cur;
  logic       active, last_phase;
  logic       src_v;
  token_t     src;
  sample_t    op_a, op_b, op_c, mcu_d;
  logic       fire;
  token_t     res;
  logic       hold_we;

  assign active     = (int'(phase) < int'(nsteps_q));
  assign last_phase = (int'(phase) == int'(nsteps_q) - 1);
  assign in_ready   = (phase == '0);

  always_comb begin
    cur     = steps_q[phase];
    src_v   = (phase == '0) ? in_valid : fb_valid;
    src     = (phase == '0) ? in_tok   : fb_tok;
    op_a    = '0;
    op_b    = '0;
    op_c    = '0;
    fire    = 1'b0;
    hold_we = 1'b0;
    res     = src;
    if (cur.target == TGT_ODD) begin
      op_a    = hold_d[phase];
      op_b    = hold_s[phase];
      op_c    = hold_last[phase] ? hold_s[phase] : src.s;
      fire    = hold_v[phase] && (hold_last[phase] || src_v);
      hold_we = src_v || (hold_v[phase] && hold_last[phase]);
      res.s     = hold_s[phase];
      res.d     = mcu_d;
      res.first = hold_first[phase];
      res.last  = hold_last[phase];
    end else begin
      op_a  = src.s;
      op_b  = (src.first || cur.mode == MCU_SINGLE) ? src.d : prev_d[phase];
      op_c  = src.d;
      fire  = src_v;
      res.s = mcu_d;
    end
  end

  mcu #(.COEF_FRAC(COEF_FRAC)) u_mcu (
    .a   (op_a),
    .b   (op_b),
    .c   (op_c),
    .mode(cur.mode),
    .coef(cur.coef),
    .d   (mcu_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fold_q    <= 2'd1;
      nsteps_q  <= 2'd0;
      steps_q   <= '0;
      phase     <= '0;
      fb_valid  <= 1'b0;
      fb_tok    <= '0;
      out_valid <= 1'b0;
      out_tok   <= '0;
      for (int k = 0; k < FOLD_MAX; k++) begin
        hold_v[k]     <= 1'b0;
        hold_s[k]     <= '0;
        hold_d[k]     <= '0;
        hold_first[k] <= 1'b0;
        hold_last[k]  <= 1'b0;
        prev_d[k]     <= '0;
      end
    end else if (cfg_load) begin
      fold_q    <= cfg_fold;
      nsteps_q  <= cfg_nsteps;
      steps_q   <= cfg_steps;
      phase     <= '0;
      fb_valid  <= 1'b0;
      out_valid <= 1'b0;
      for (int k = 0; k < FOLD_MAX; k++) hold_v[k] <= 1'b0;
    end else begin
      phase <= (int'(phase) + 1 >= int'(fold_q)) ? '0 : phase + 1'b1;
      if (nsteps_q == 2'd0) begin
        // no step on this PE: registered pass-through
        fb_valid  <= 1'b0;
        out_valid <= in_valid && (phase == '0);
        out_tok   <= in_tok;
      end else begin
        fb_valid  <= active && !last_phase && fire;
        out_valid <= active &&  last_phase && fire;
        if (active && !last_phase) fb_tok  <= res;
        if (active &&  last_phase) out_tok <= res;
        if (active && cur.target == TGT_ODD && hold_we) begin
          hold_v[phase]     <= src_v;
          hold_s[phase]     <= src.s;
          hold_d[phase]     <= src.d;
          hold_first[phase] <= src.first;
          hold_last[phase]  <= src.last;
        end
        if (active && cur.target == TGT_EVEN && src_v)
          prev_d[phase] <= src.d;
      end
    end
  end

endmodule
