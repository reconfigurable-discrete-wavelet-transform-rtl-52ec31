// dwt_pe_tb -- self-checking test of one reconfigurable DWT PE.
//
// Streams lines of random length and content through the PE in several
// configurations: one predict step, one update step, two steps folded
// (the first half of (9,7)), subtract and single-input modes, and zero
// steps (pass-through). Outputs are compared pair by pair with the
// reference model, which applies the same lifting steps to the whole line
// with symmetric extension. Also checks the rate: with input always
// available the PE accepts one pair every `fold` cycles.
module dwt_pe_tb;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     cfg_load;
  logic [1:0]               cfg_fold, cfg_nsteps;
  lift_step_t [1:0]         cfg_steps;
  logic                     in_valid, in_ready, out_valid;
  token_t                   in_tok, out_tok;

  int checks = 0, failures = 0;
  token_t exp_q[$];
  token_t in_q[$];

  dwt_pe dut (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .cfg_fold(cfg_fold),
    .cfg_nsteps(cfg_nsteps), .cfg_steps(cfg_steps), .in_valid(in_valid),
    .in_ready(in_ready), .in_tok(in_tok), .out_valid(out_valid), .out_tok(out_tok));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output s=%0d d=%0d", out_tok.s, out_tok.d);
      end else begin
        token_t e;
        e = exp_q.pop_front();
        if (out_tok !== e) begin
          failures++;
          $display("FAIL out s=%0d d=%0d f=%0b l=%0b, expected s=%0d d=%0d f=%0b l=%0b",
                   out_tok.s, out_tok.d, out_tok.first, out_tok.last, e.s, e.d, e.first, e.last);
        end
      end
    end
  end

  // build lines and expected results for the given steps
  task automatic make_lines(input int nlines, input lift_step_t st[], input int nsteps,
                            input int amp);
    for (int l = 0; l < nlines; l++) begin
      int s[$], d[$];
      int m;
      m = $urandom_range(1, 9);
      s = {};
      d = {};
      for (int n = 0; n < m; n++) begin
        token_t t;
        s.push_back($urandom_range(0, 2 * amp) - amp);
        d.push_back($urandom_range(0, 2 * amp) - amp);
        t.s = sample_t'(s[n]); t.d = sample_t'(d[n]);
        t.first = (n == 0); t.last = (n == m - 1);
        in_q.push_back(t);
      end
      lift_pairs(s, d, st, 0, nsteps);
      for (int n = 0; n < m; n++) begin
        token_t t;
        t.s = sample_t'(s[n]); t.d = sample_t'(d[n]);
        t.first = (n == 0); t.last = (n == m - 1);
        exp_q.push_back(t);
      end
    end
  endtask

  task automatic run_cfg(input string name, input int fold, input lift_step_t st[],
                         input int nsteps, input bit gaps);
    int accepted, first_cyc, last_cyc, cyc;
    @(negedge clk);
    cfg_fold   = 2'(fold);
    cfg_nsteps = 2'(nsteps);
    cfg_steps[0] = st[0];
    cfg_steps[1] = st[1];
    cfg_load   = 1;
    @(negedge clk);
    cfg_load   = 0;
    make_lines(12, st, nsteps, 300);
    accepted = 0; cyc = 0; first_cyc = -1; last_cyc = 0;
    while (in_q.size() > 0) begin
      in_valid = !gaps || ($urandom_range(0, 3) != 0);
      in_tok   = in_q[0];
      @(posedge clk);
      cyc++;
      if (in_valid && in_ready) begin
        void'(in_q.pop_front());
        accepted++;
        if (first_cyc < 0) first_cyc = cyc;
        last_cyc = cyc;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %s: %0d outputs missing", name, exp_q.size());
      exp_q = {};
    end
    if (!gaps) begin
      checks++;
      if (last_cyc - first_cyc != (accepted - 1) * fold) begin
        failures++;
        $display("FAIL %s: %0d pairs took %0d cycles, expected %0d per pair",
                 name, accepted, last_cyc - first_cyc + 1, fold);
      end
    end
    $display("%s done", name);
  endtask

  initial begin
    lift_step_t st[];
    st = new[2];
    cfg_load = 0; cfg_fold = 1; cfg_nsteps = 0; cfg_steps = '0;
    in_valid = 0; in_tok = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    st[0] = mk_step(TGT_ODD, MCU_ADD, -2048); st[1] = '0;
    run_cfg("predict fold1", 1, st, 1, 0);
    run_cfg("predict fold1 gaps", 1, st, 1, 1);
    st[0] = mk_step(TGT_EVEN, MCU_ADD, 1024);
    run_cfg("update fold1", 1, st, 1, 0);
    st[0] = mk_step(TGT_ODD, MCU_ADD, -6497); st[1] = mk_step(TGT_EVEN, MCU_ADD, -217);
    run_cfg("9/7 half fold2", 2, st, 2, 0);
    run_cfg("9/7 half fold2 gaps", 2, st, 2, 1);
    st[0] = mk_step(TGT_EVEN, MCU_SUB, 3000); st[1] = mk_step(TGT_ODD, MCU_SUB, -1500);
    run_cfg("sub fold2", 2, st, 2, 1);
    st[0] = mk_step(TGT_ODD, MCU_SINGLE, -4096); st[1] = mk_step(TGT_EVEN, MCU_SINGLE, 2048);
    run_cfg("haar fold2", 2, st, 2, 0);
    st[0] = mk_step(TGT_ODD, MCU_ADD, 1234); st[1] = '0;
    run_cfg("one step fold2", 2, st, 1, 1);
    run_cfg("bypass", 1, st, 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
