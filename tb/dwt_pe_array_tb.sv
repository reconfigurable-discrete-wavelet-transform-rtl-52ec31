// dwt_pe_array_tb -- self-checking test of the two-PE lifting array.
//
// Runs the default (5,3) and (9,7) kernels, a three-step kernel folded by
// two (one MCU slot idle) and a one-step kernel (second PE idle) over
// streams of lines, and compares every output pair with the reference
// model. With input always available it measures the throughput in samples
// per cycle, which must be 2 for (5,3) and 1 for the folded kernels, and
// the MCU utilisation steps / (PEs * fold): 100 % for (5,3) and (9,7),
// 75 % for three steps.
module dwt_pe_array_tb;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    cfg_load, in_valid, in_ready, out_valid;
  pe_ctx_t ctx;
  token_t  in_tok, out_tok;

  int checks = 0, failures = 0;
  token_t exp_q[$];
  token_t in_q[$];

  dwt_pe_array dut (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .ctx(ctx), .in_valid(in_valid),
    .in_ready(in_ready), .in_tok(in_tok), .out_valid(out_valid), .out_tok(out_tok));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        token_t e;
        e = exp_q.pop_front();
        if (out_tok !== e) begin
          failures++;
          $display("FAIL out s=%0d d=%0d, expected s=%0d d=%0d", out_tok.s, out_tok.d, e.s, e.d);
        end
      end
    end
  end

  task automatic run_ctx(input string name, input pe_ctx_t c, input int exp_samples_per_cycle_x2,
                         input int exp_util_pct, input bit gaps);
    lift_step_t st[];
    int accepted, first_cyc, last_cyc, cyc, util;
    ctx_steps(c, st);
    @(negedge clk);
    ctx = c;
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    for (int l = 0; l < 10; l++) begin
      int s[$], d[$];
      int m;
      m = $urandom_range(1, 12);
      s = {}; d = {};
      for (int n = 0; n < m; n++) begin
        token_t t;
        s.push_back($urandom_range(0, 255));
        d.push_back($urandom_range(0, 255));
        t.s = sample_t'(s[n]); t.d = sample_t'(d[n]); t.first = (n == 0); t.last = (n == m - 1);
        in_q.push_back(t);
      end
      lift_pairs(s, d, st, 0, int'(c.nsteps));
      for (int n = 0; n < m; n++) begin
        token_t t;
        t.s = sample_t'(s[n]); t.d = sample_t'(d[n]); t.first = (n == 0); t.last = (n == m - 1);
        exp_q.push_back(t);
      end
    end
    accepted = 0; cyc = 0; first_cyc = -1; last_cyc = 0;
    while (in_q.size() > 0) begin
      in_valid = !gaps || ($urandom_range(0, 2) != 0);
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
    repeat (16) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %s: %0d outputs missing", name, exp_q.size());
      exp_q = {};
    end
    if (!gaps) begin
      // samples per cycle (x2 to stay integer): 2 samples per accepted pair
      checks++;
      if (2 * 2 * accepted != exp_samples_per_cycle_x2 * (last_cyc - first_cyc + int'(c.fold))) begin
        failures++;
        $display("FAIL %s: %0d pairs in %0d cycles", name, accepted, last_cyc - first_cyc + int'(c.fold));
      end
      util = 100 * int'(c.nsteps) / (2 * int'(c.fold));
      checks++;
      if (util != exp_util_pct) begin
        failures++;
        $display("FAIL %s: utilisation %0d%%", name, util);
      end
      $display("%s: %0d samples in %0d cycles, utilisation %0d%%", name, 2 * accepted,
               last_cyc - first_cyc + int'(c.fold), util);
    end
  endtask

  initial begin
    pe_ctx_t c3, c1;
    cfg_load = 0; ctx = '0; in_valid = 0; in_tok = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_ctx("(5,3)", pe_pla(3'd0), 4, 100, 0);
    run_ctx("(9,7)", pe_pla(3'd1), 2, 100, 0);
    run_ctx("(5,3) gaps", pe_pla(3'd0), 4, 100, 1);
    run_ctx("(9,7) gaps", pe_pla(3'd1), 2, 100, 1);
    c3 = '0; c3.fold = 2; c3.nsteps = 3;
    c3.steps[0] = mk_step(TGT_ODD, MCU_ADD, -2048);
    c3.steps[1] = mk_step(TGT_EVEN, MCU_ADD, 1024);
    c3.steps[2] = mk_step(TGT_ODD, MCU_SUB, 700);
    run_ctx("three steps", c3, 2, 75, 0);
    c1 = '0; c1.fold = 1; c1.nsteps = 1;
    c1.steps[0] = mk_step(TGT_ODD, MCU_SINGLE, -4096);
    run_ctx("one step", c1, 4, 50, 0);
    run_ctx("(5,3) again", pe_pla(3'd0), 4, 100, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
