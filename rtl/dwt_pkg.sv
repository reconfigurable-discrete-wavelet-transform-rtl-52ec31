// dwt_pkg -- types, sizes and default configurations shared by the
// reconfigurable lifting DWT engine.
//
// A wavelet filter is described as a list of lifting steps. Every step is
// executed by one pass through the MCU core cell, D = A + alpha*(B op C),
// where "op" is +, - or "B only" (the three basic computing units). A step
// either updates the odd (high-pass) channel from two neighbouring even
// samples s[n], s[n+1] (a "predict" step, TGT_ODD) or the even (low-pass)
// channel from d[n-1], d[n] (an "update" step, TGT_EVEN). The PE context
// also gives the fold factor: the number of clock cycles each PE spends on
// one sample pair, i.e. the number of lifting steps it time-multiplexes.
//
// The wavelet decomposition structure is a program of passes. One pass
// runs the 1-D transform over every line of one subband, along rows or
// along columns. Coefficients stay in place: a subband at level l with
// offset (ro, co) occupies rows ro + k*2^l and columns co + m*2^l of the
// frame, and its pairs are samples 2^l apart.
//
// Choices of this design (the architecture leaves them open): 16-bit signed
// samples, 16-bit coefficients with 12 fraction bits, round-half-up of the
// product, whole-sample symmetric boundary extension, 10-bit row and column
// addresses (enough for a 720x576 CCIR 601 frame). Two PEs and a largest
// fold of 2 follow the prototype configuration.
package dwt_pkg;

  localparam int C_DATA_W    = 16;
  localparam int C_COEF_W    = 16;
  localparam int C_COEF_FRAC = 12;
  localparam int C_NUM_PE    = 2;
  localparam int C_FOLD_MAX  = 2;
  localparam int MAX_STEPS = C_NUM_PE * C_FOLD_MAX;
  localparam int ROW_W     = 10;
  localparam int COL_W     = 10;
  localparam int LEVEL_W   = 3;
  localparam int PASS_IDX_W = 8;

  typedef logic signed [C_DATA_W-1:0] sample_t;
  typedef logic signed [C_COEF_W-1:0] coef_t;

  // Basic computing unit structure selected in the MCU.
  typedef enum logic [1:0] {
    MCU_ADD    = 2'd0,  // D = A + alpha*(B + C)
    MCU_SUB    = 2'd1,  // D = A + alpha*(B - C)
    MCU_SINGLE = 2'd2   // D = A + alpha*B
  } mcu_mode_e;

  // Channel a lifting step writes.
  typedef enum logic {
    TGT_ODD  = 1'b0,    // predict: d[n] += alpha*(s[n] op s[n+1])
    TGT_EVEN = 1'b1     // update:  s[n] += alpha*(d[n-1] op d[n])
  } lift_target_e;

  typedef struct packed {
    lift_target_e target;
    mcu_mode_e    mode;
    coef_t        coef;
  } lift_step_t;

  // One entry of the PE context memory: a complete filter kernel.
  typedef struct packed {
    logic [1:0]                  fold;    // cycles per sample pair, 1..FOLD_MAX
    logic [2:0]                  nsteps;  // lifting steps, 1..MAX_STEPS
    lift_step_t [MAX_STEPS-1:0]  steps;   // steps[0] is applied first
  } pe_ctx_t;

  // A sample pair travelling through the PE array. On input s/d are the
  // even/odd samples, on output the low-pass/high-pass coefficients.
  typedef struct packed {
    sample_t s;
    sample_t d;
    logic    first;   // first pair of a line
    logic    last;    // last pair of a line
  } token_t;

  typedef enum logic {
    DIR_ROW = 1'b0,   // transform along rows (pairs are horizontal)
    DIR_COL = 1'b1    // transform along columns
  } dir_e;

  // One entry of the AG context memory: one pass over one subband.
  typedef struct packed {
    dir_e               dir;
    logic [LEVEL_W-1:0] level;    // sample distance is 2^level
    logic [ROW_W-1:0]   row_off;  // subband row offset, < 2^level
    logic [COL_W-1:0]   col_off;  // subband column offset, < 2^level
    logic               last;     // last pass of the program
  } pass_t;

  localparam int PE_PLA_ENTRIES = 2;   // context 0: (5,3), context 1: (9,7)
  localparam int AG_PLA_PROGS   = 3;   // programs 0..2 are in the PLA, 3 is the RAM

  function automatic lift_step_t mk_step(lift_target_e t, mcu_mode_e m, int c);
    lift_step_t st;
    st.target = t;
    st.mode   = m;
    st.coef   = coef_t'(c);
    return st;
  endfunction

  // Default filter kernels (PE context PLA). Coefficients in Q(COEF_FRAC).
  //  0: (5,3)  d += -1/2(s[n]+s[n+1]);  s += 1/4(d[n-1]+d[n]); 2 steps, fold 1
  //  1: (9,7)  alpha=-1.586134342 beta=-0.052980118 gamma=0.882911076
  //            delta=0.443506852 (scaling by K not applied); 4 steps, fold 2
  function automatic pe_ctx_t pe_pla(input logic [2:0] idx);
    pe_ctx_t c;
    c = '0;
    case (idx)
      3'd0: begin
        c.fold = 2'd1; c.nsteps = 3'd2;
        c.steps[0] = mk_step(TGT_ODD,  MCU_ADD, -2048);
        c.steps[1] = mk_step(TGT_EVEN, MCU_ADD,  1024);
      end
      default: begin
        c.fold = 2'd2; c.nsteps = 3'd4;
        c.steps[0] = mk_step(TGT_ODD,  MCU_ADD, -6497);
        c.steps[1] = mk_step(TGT_EVEN, MCU_ADD,  -217);
        c.steps[2] = mk_step(TGT_ODD,  MCU_ADD,  3616);
        c.steps[3] = mk_step(TGT_EVEN, MCU_ADD,  1817);
      end
    endcase
    return c;
  endfunction

  // Number of passes of each PLA program.
  function automatic int ag_pla_len(input logic [1:0] prog);
    case (prog)
      2'd0:    return 2;     // one-level 2-D transform
      2'd1:    return 6;     // three-level dyadic decomposition
      default: return 170;   // four-level full wavelet packet: 2*(1+4+16+64)
    endcase
  endfunction

  // Default decomposition programs (AG context PLA). Each subband is
  // transformed along its rows, then along its columns.
  //  0: one level;  1: three-level dyadic (LL band only);
  //  2: four-level full wavelet packet (every subband of every level).
  // For the packet program the subband number k of level l holds the row
  // offset bits in its odd bit positions and the column bits in its even
  // ones: row_off = sum k[2m+1]<<m, col_off = sum k[2m]<<m.
  function automatic pass_t ag_pla(input logic [1:0] prog, input logic [PASS_IDX_W-1:0] idx);
    pass_t p;
    int    j, lvl, base, k;
    p   = '0;
    j   = int'(idx);
    if (prog == 2'd2) begin
      lvl  = 0;
      base = 0;
      for (int l = 0; l < 4; l++) begin
        if (j >= base + 2 * (1 << (2 * l))) begin
          base = base + 2 * (1 << (2 * l));
          lvl  = l + 1;
        end
      end
      if (lvl > 3) lvl = 3;
      k = (j - base) >> 1;
      p.dir   = dir_e'((j - base) & 1);
      p.level = LEVEL_W'(lvl);
      for (int m = 0; m < 3; m++) begin
        if (m < lvl) begin
          p.row_off[m] = k[2*m+1];
          p.col_off[m] = k[2*m];
        end
      end
    end else begin
      p.dir   = dir_e'(j & 1);
      p.level = LEVEL_W'(j >> 1);
    end
    p.last = (j >= ag_pla_len(prog) - 1);
    return p;
  endfunction

endpackage
