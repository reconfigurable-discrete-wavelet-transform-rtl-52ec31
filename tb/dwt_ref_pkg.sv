// dwt_ref_pkg -- reference model for the testbenches of the lifting DWT.
//
// Computes the transform directly on whole arrays, without streaming,
// folding or pipelining: a line is split into s[n] = x[2n] and
// d[n] = x[2n+1], every lifting step is applied to all n in turn with
// symmetric extension at both ends (s[M] = s[M-1], d[-1] = d[0]), and the
// coefficients are put back in place. The arithmetic is the fixed-point
// rule of the engine written out in integers: the MCU product is rounded
// half up at COEF_FRAC fraction bits and every result wraps to 16 bits.
package dwt_ref_pkg;
  import dwt_pkg::*;

  function automatic int wrap16(input longint v);
    return int'(shortint'(v));
  endfunction

  function automatic int mcu_ref(input int a, input int b, input int c,
                                 input mcu_mode_e mode, input int coef);
    longint bc, p, r;
    case (mode)
      MCU_ADD: bc = longint'(b) + longint'(c);
      MCU_SUB: bc = longint'(b) - longint'(c);
      default: bc = longint'(b);
    endcase
    p = bc * longint'(coef);
    r = (p + (longint'(1) << (C_COEF_FRAC - 1))) >>> C_COEF_FRAC;
    return wrap16(longint'(a) + r);
  endfunction

  // Apply steps[first_step .. first_step+count-1] to sample pairs s/d.
  function automatic void lift_pairs(ref int s[$], ref int d[$], input lift_step_t steps[],
                                     input int first_step, input int count);
    int m;
    m = s.size();
    for (int k = first_step; k < first_step + count; k++) begin
      lift_step_t st;
      st = steps[k];
      if (st.target == TGT_ODD) begin
        for (int n = 0; n < m; n++) begin
          int nxt;
          nxt = (n == m - 1) ? s[n] : s[n+1];
          d[n] = mcu_ref(d[n], s[n], nxt, st.mode, int'(st.coef));
        end
      end else begin
        for (int n = 0; n < m; n++) begin
          int prv;
          prv = (n == 0 || st.mode == MCU_SINGLE) ? d[n] : d[n-1];
          s[n] = mcu_ref(s[n], prv, d[n], st.mode, int'(st.coef));
        end
      end
    end
  endfunction

  function automatic void ctx_steps(input pe_ctx_t ctx, output lift_step_t st[]);
    st = new[MAX_STEPS];
    for (int k = 0; k < MAX_STEPS; k++) st[k] = ctx.steps[k];
  endfunction

  // One pass of the 2-D in-place transform on image img (row-major, w x h).
  function automatic void ref_pass(ref int img[], input int w, input int h,
                                   input pass_t p, input pe_ctx_t ctx);
    int         stride, len, nlines, m;
    lift_step_t st[];
    ctx_steps(ctx, st);
    stride = 1 << int'(p.level);
    len    = ((p.dir == DIR_ROW) ? w : h) >> int'(p.level);
    nlines = ((p.dir == DIR_ROW) ? h : w) >> int'(p.level);
    m      = len / 2;
    for (int ln = 0; ln < nlines; ln++) begin
      int s[$], d[$];
      int outer;
      outer = ((p.dir == DIR_ROW) ? int'(p.row_off) : int'(p.col_off)) + ln * stride;
      s = {};
      d = {};
      for (int n = 0; n < m; n++) begin
        int i0, i1;
        i0 = ((p.dir == DIR_ROW) ? int'(p.col_off) : int'(p.row_off)) + 2 * n * stride;
        i1 = i0 + stride;
        if (p.dir == DIR_ROW) begin
          s.push_back(img[outer * w + i0]);
          d.push_back(img[outer * w + i1]);
        end else begin
          s.push_back(img[i0 * w + outer]);
          d.push_back(img[i1 * w + outer]);
        end
      end
      lift_pairs(s, d, st, 0, int'(ctx.nsteps));
      for (int n = 0; n < m; n++) begin
        int i0, i1;
        i0 = ((p.dir == DIR_ROW) ? int'(p.col_off) : int'(p.row_off)) + 2 * n * stride;
        i1 = i0 + stride;
        if (p.dir == DIR_ROW) begin
          img[outer * w + i0] = s[n];
          img[outer * w + i1] = d[n];
        end else begin
          img[i0 * w + outer] = s[n];
          img[i1 * w + outer] = d[n];
        end
      end
    end
  endfunction

endpackage
