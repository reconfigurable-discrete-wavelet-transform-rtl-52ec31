// dwt_pe_array -- 1-D linear array of reconfigurable DWT PEs.
//
// NUM_PE processing elements are cascaded: the pair leaving PE p enters
// PE p+1. The lifting steps of the selected filter are folded onto the
// array: with fold factor F (from the context, F = ceil(steps/NUM_PE)),
// PE p executes steps p*F .. p*F+F-1, each PE spending F cycles per pair.
// With two PEs, (5,3) runs unfolded at one pair (two samples) per cycle,
// and (9,7) is folded by two and runs at one pair per two cycles. Filters
// whose step count does not fill all NUM_PE*F slots leave MCU slots idle
// (3 steps on two PEs: 75 % utilisation).
//
// Interface: cfg_load with ctx (a PE context memory entry) reconfigures
// all PEs in the same cycle; in_valid/in_ready/in_tok takes even/odd
// sample pairs in line order; out_valid/out_tok delivers low/high
// coefficient pairs in the same order, without back-pressure.
// The cascade and the folding follow the document; the step-to-PE
// assignment rule is this design's.
module dwt_pe_array
  import dwt_pkg::*;
#(
  parameter int NUM_PE   = dwt_pkg::C_NUM_PE,
  parameter int FOLD_MAX = dwt_pkg::C_FOLD_MAX
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cfg_load,
  input  pe_ctx_t ctx,
  input  logic    in_valid,
  output logic    in_ready,
  input  token_t  in_tok,
  output logic    out_valid,
  output token_t  out_tok
);

  logic                      v   [NUM_PE+1];
  token_t                    tok [NUM_PE+1];
  logic                      rdy [NUM_PE];
  logic [1:0]                pe_nsteps [NUM_PE];
  lift_step_t [FOLD_MAX-1:0] pe_steps  [NUM_PE];

  // step distribution: PE p gets steps p*F .. p*F+F-1
  always_comb begin
    for (int p = 0; p < NUM_PE; p++) begin
      int n;
      n = int'(ctx.nsteps) - p * int'(ctx.fold);
      if (n < 0) n = 0;
      if (n > int'(ctx.fold)) n = int'(ctx.fold);
      pe_nsteps[p] = 2'(n);
      for (int j = 0; j < FOLD_MAX; j++) begin
        int idx;
        idx = p * int'(ctx.fold) + j;
        pe_steps[p][j] = (j < n && idx < MAX_STEPS) ? ctx.steps[idx] : '0;
      end
    end
  end

  assign v[0]   = in_valid;
  assign tok[0] = in_tok;

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    dwt_pe #(.FOLD_MAX(FOLD_MAX)) u_pe (
      .clk       (clk),
      .rst_n     (rst_n),
      .cfg_load  (cfg_load),
      .cfg_fold  (ctx.fold),
      .cfg_nsteps(pe_nsteps[p]),
      .cfg_steps (pe_steps[p]),
      .in_valid  (v[p]),
      .in_ready  (rdy[p]),
      .in_tok    (tok[p]),
      .out_valid (v[p+1]),
      .out_tok   (tok[p+1])
    );
    if (p > 0) begin : g_chk
      // a PE must never present a pair that the next PE cannot take
      a_no_drop: assert property (@(posedge clk) disable iff (!rst_n)
                                  v[p] |-> rdy[p]);
    end
  end

  assign in_ready  = rdy[0];
  assign out_valid = v[NUM_PE];
  assign out_tok   = tok[NUM_PE];

  a_fold_range: assert property (@(posedge clk) disable iff (!rst_n)
      cfg_load |-> (ctx.fold >= 2'd1 && int'(ctx.fold) <= FOLD_MAX &&
                    int'(ctx.nsteps) <= NUM_PE * int'(ctx.fold)));

endmodule
