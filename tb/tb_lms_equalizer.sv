// tb_lms_equalizer: self-checking test of the complex LMS equalizer.
//
// Random 16-QAM symbols pass through a two-tap channel (0.1, 0.9) with a
// little uniform noise, computed here in real arithmetic; the equalizer is
// trained with the symbols delayed by 5. The testbench keeps its own
// bit-true model of the fixed-point filter and update (64-bit integers,
// round half up, saturation) and compares y, e and all weights after every
// sample. It also checks:
//  * latency: out_valid two cycles after in_valid;
//  * convergence: with mu = 0.006 the two largest weights approach the
//    channel inverse, 1/0.9 = 1.111 at lag 4 and -0.1235 at lag 3, and the
//    late error power is far below the early one;
//  * step size: mu = 0.006 reaches a mean |e|^2 below 0.05 in fewer symbols
//    than mu = 0.001, as the training-time comparison of the two step sizes
//    predicts;
//  * hold: with train low the weights do not move and out_err is zero.
module tb_lms_equalizer;
  import modem_pkg::*;
  localparam int L = 5, D = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, dv = 0, train = 0, ov, adapted;
  logic [15:0] mu = 16'd393;
  cplx_t x = '0, d = '0, y, e;
  logic signed [23:0] w_re [L], w_im [L];

  lms_equalizer u_dut (.clk, .rst_n, .in_valid(v), .in_sym(x), .d_valid(dv), .d_sym(d),
                       .train, .mu, .out_valid(ov), .out_sym(y), .out_err(e),
                       .adapted, .w_re, .w_im);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- bit-true reference model ----------------
  longint mwr [L], mwi [L], mxr [L], mxi [L];
  longint exp_yr, exp_yi, exp_er, exp_ei;
  bit     exp_adapt;

  typedef struct {
    longint yr, yi, er, ei;
    bit     adapt;
    longint wr [L];
    longint wi [L];
  } expect_t;
  expect_t exq [$];

  function automatic longint rsh(input longint a, input int sh);
    return (a + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction
  function automatic longint sat(input longint a, input int w);
    longint mx;
    mx = (longint'(1) <<< (w - 1)) - 1;
    return (a > mx) ? mx : ((a < -mx - 1) ? -mx - 1 : a);
  endfunction

  task automatic model_step(input cplx_t xs, input cplx_t ds, input bit adapt, input longint m);
    longint ar, ai;
    for (int n = L - 1; n > 0; n--) begin mxr[n] = mxr[n-1]; mxi[n] = mxi[n-1]; end
    mxr[0] = xs.re; mxi[0] = xs.im;
    ar = 0; ai = 0;
    for (int n = 0; n < L; n++) begin
      ar += mwr[n] * mxr[n] - mwi[n] * mxi[n];
      ai += mwr[n] * mxi[n] + mwi[n] * mxr[n];
    end
    exp_yr = sat(rsh(ar, 20), 16);
    exp_yi = sat(rsh(ai, 20), 16);
    exp_er = sat(longint'(ds.re) - exp_yr, 16);
    exp_ei = sat(longint'(ds.im) - exp_yi, 16);
    exp_adapt = adapt;
    if (adapt)
      for (int n = 0; n < L; n++) begin
        longint pr, pi;
        pr = exp_er * mxr[n] + exp_ei * mxi[n];
        pi = exp_ei * mxr[n] - exp_er * mxi[n];
        mwr[n] = sat(mwr[n] + rsh(pr * m, 20), 24);
        mwi[n] = sat(mwi[n] + rsh(pi * m, 20), 24);
      end
    else begin
      exp_er = 0; exp_ei = 0;
    end
    begin
      expect_t ex;
      ex.yr = exp_yr; ex.yi = exp_yi; ex.er = exp_er; ex.ei = exp_ei; ex.adapt = exp_adapt;
      ex.wr = mwr; ex.wi = mwi;
      exq.push_back(ex);
    end
  endtask

  // ---------------- output checking ----------------
  bit v_d = 0, v_dd = 0;
  int n_out = 0;
  always @(posedge clk) if (rst_n) begin
    check(ov == v_dd, "latency two cycles");
    if (ov) begin
      bit ok;
      expect_t ex;
      ok = exq.size() > 0;
      if (ok) begin
        ex = exq.pop_front();
        ok = (longint'(y.re) == ex.yr) && (longint'(y.im) == ex.yi) &&
             (longint'(e.re) == ex.er) && (longint'(e.im) == ex.ei) && (adapted == ex.adapt);
        for (int n = 0; n < L; n++) ok &= (longint'(w_re[n]) == ex.wr[n]) && (longint'(w_im[n]) == ex.wi[n]);
      end
      check(ok, $sformatf("bit-true output %0d: y=(%0d,%0d) model (%0d,%0d)", n_out, y.re, y.im, ex.yr, ex.yi));
      n_out++;
    end
    v_dd = v_d;
    v_d  = v;
  end

  // ---------------- stimulus ----------------
  localparam int LEV [4] = '{-3, 3, -1, 1};
  real   cr_prev = 0.0, ci_prev = 0.0;
  cplx_t hist [$];
  real   err_hist [$];

  function automatic real nz();
    return (real'($urandom % 2001) - 1000.0) / 1000.0 * 0.03;
  endfunction

  // Drives one symbol; the model is stepped in the same cycle.
  task automatic drive(input bit do_train);
    cplx_t s, r;
    real cr, ci;
    s.re = sample_t'(LEV[$urandom % 4] * 4096);
    s.im = sample_t'(LEV[$urandom % 4] * 4096);
    cr = real'(s.re) / 4096.0; ci = real'(s.im) / 4096.0;
    r.re = sample_t'($rtoi((0.1 * cr + 0.9 * cr_prev + nz()) * 4096.0));
    r.im = sample_t'($rtoi((0.1 * ci + 0.9 * ci_prev + nz()) * 4096.0));
    cr_prev = cr; ci_prev = ci;
    hist.push_back(s);
    @(negedge clk);
    v = 1; x = r;
    dv = (hist.size() > D);
    d = dv ? hist[hist.size() - 1 - D] : '0;
    train = do_train;
    model_step(r, d, do_train && dv, longint'(mu));
    @(negedge clk);
    v = 0;
    // error power of the sample just processed, from the model
    err_hist.push_back((real'(exp_er) ** 2 + real'(exp_ei) ** 2) / 16777216.0);
  endtask

  task automatic restart(input logic [15:0] m);
    @(negedge clk);
    rst_n = 0; v = 0; mu = m;
    for (int n = 0; n < L; n++) begin mwr[n] = 0; mwi[n] = 0; mxr[n] = 0; mxi[n] = 0; end
    hist.delete(); err_hist.delete(); exq.delete(); cr_prev = 0.0; ci_prev = 0.0; v_d = 0; v_dd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  // Symbols until the mean |e|^2 over a 20-symbol window falls below th.
  function automatic int conv_time(input real th);
    for (int k = D + 20; k < err_hist.size(); k++) begin
      real s;
      s = 0.0;
      for (int j = k - 20; j < k; j++) s += err_hist[j];
      if (s / 20.0 < th) return k;
    end
    return 1 << 30;
  endfunction

  int t_fast, t_slow;
  initial begin
    for (int n = 0; n < L; n++) begin mwr[n] = 0; mwi[n] = 0; mxr[n] = 0; mxi[n] = 0; end
    // ---- mu = 0.006: train, check convergence, then hold ----
    restart(16'd393);
    for (int k = 0; k < 1500; k++) drive(1'b1);
    t_fast = conv_time(0.05);
    begin
      real w4, w3, early, late;
      w4 = real'(w_re[4]) / 1048576.0;
      w3 = real'(w_re[3]) / 1048576.0;
      early = 0.0; late = 0.0;
      for (int k = D; k < D + 50; k++) early += err_hist[k];
      for (int k = 1400; k < 1500; k++) late += err_hist[k];
      $display("tb_lms_equalizer: mu=0.006 w4=%f w3=%f early %g late %g converged after %0d symbols",
               w4, w3, early / 50.0, late / 100.0, t_fast);
      check(w4 > 1.09 && w4 < 1.13, "main weight near 1/0.9");
      check(w3 > -0.145 && w3 < -0.10, "second weight near -0.1235");
      check(late / 100.0 < early / 50.0 / 100.0, "error power falls by 20 dB");
    end
    begin
      logic signed [23:0] keep_re [L], keep_im [L];
      repeat (3) @(negedge clk);   // let the last training update land
      keep_re = w_re; keep_im = w_im;
      for (int k = 0; k < 200; k++) drive(1'b0);
      for (int n = 0; n < L; n++) check(w_re[n] == keep_re[n] && w_im[n] == keep_im[n], "weights held");
    end
    // ---- mu = 0.001 ----
    restart(16'd66);
    for (int k = 0; k < 1500; k++) drive(1'b1);
    t_slow = conv_time(0.05);
    $display("tb_lms_equalizer: mu=0.001 converged after %0d symbols", t_slow);
    check(t_fast < t_slow, "larger step size converges faster");
    check(t_slow < 1500, "mu = 0.001 converges within 1500 symbols");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
