// tb_lms_filter_update: bit-true test of the LMS filter and weight update.
// Random tap vectors (constellation-sized samples with noise), random desired
// symbols and random adapt flags and step sizes drive the block; a 64-bit
// integer model written here computes y = sum w*x (rounded from Q.32 to
// Q.12, saturated), e = d - y, and w += round(mu * e * conj(x) / 2^20),
// saturated to 24 bits. After each input y, e, adapted and all weights must
// match, one cycle later. A saturation phase with large samples and the
// largest step size drives the weights to their limits.
module tb_lms_filter_update;
  import modem_pkg::*;
  localparam int L = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, a = 0, ov, adapted;
  logic [15:0] mu = 0;
  cplx_t taps [L];
  cplx_t d = '0, y, e;
  logic signed [23:0] w_re [L], w_im [L];

  lms_filter_update u_dut (.clk, .rst_n, .in_valid(v), .taps, .d_sym(d), .adapt(a), .mu,
                           .out_valid(ov), .out_sym(y), .out_err(e), .adapted, .w_re, .w_im);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic longint rsh(input longint x, input int sh);
    return (x + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction
  function automatic longint sat(input longint x, input int w);
    longint mx;
    mx = (longint'(1) <<< (w - 1)) - 1;
    return (x > mx) ? mx : ((x < -mx - 1) ? -mx - 1 : x);
  endfunction

  longint mwr [L], mwi [L];
  longint eyr, eyi, eer, eei;
  bit     ead, v_d = 0;
  typedef struct { longint yr, yi, er, ei; bit ad; longint wr [L]; longint wi [L]; } exp_t;
  exp_t   exq [$];
  int     n_sat = 0;

  always @(posedge clk) if (rst_n) begin
    check(ov == v_d, "out_valid one cycle after in_valid");
    if (ov) begin
      bit ok;
      exp_t x;
      ok = exq.size() > 0;
      if (ok) begin
        x = exq.pop_front();
        ok = longint'(y.re) == x.yr && longint'(y.im) == x.yi && longint'(e.re) == x.er &&
             longint'(e.im) == x.ei && adapted == x.ad;
        for (int n = 0; n < L; n++) ok &= longint'(w_re[n]) == x.wr[n] && longint'(w_im[n]) == x.wi[n];
      end
      check(ok, $sformatf("y=(%0d,%0d) model (%0d,%0d)", y.re, y.im, x.yr, x.yi));
    end
    v_d = v;
  end

  task automatic step(input int amp, input int mu_max);
    longint ar, ai;
    @(negedge clk);
    for (int n = 0; n < L; n++) begin
      taps[n].re = sample_t'(int'($urandom % (2 * amp + 1)) - amp);
      taps[n].im = sample_t'(int'($urandom % (2 * amp + 1)) - amp);
    end
    d.re = sample_t'(int'($urandom % 32768) - 16384);
    d.im = sample_t'(int'($urandom % 32768) - 16384);
    a  = ($urandom % 4 != 0);
    mu = 16'($urandom % (mu_max + 1));
    v  = 1;
    ar = 0; ai = 0;
    for (int n = 0; n < L; n++) begin
      ar += mwr[n] * taps[n].re - mwi[n] * taps[n].im;
      ai += mwr[n] * taps[n].im + mwi[n] * taps[n].re;
    end
    eyr = sat(rsh(ar, 20), 16);
    eyi = sat(rsh(ai, 20), 16);
    eer = sat(longint'(d.re) - eyr, 16);
    eei = sat(longint'(d.im) - eyi, 16);
    ead = a;
    if (a) begin
      for (int n = 0; n < L; n++) begin
        longint pr, pi, nr, ni;
        pr = eer * taps[n].re + eei * taps[n].im;
        pi = eei * taps[n].re - eer * taps[n].im;
        nr = mwr[n] + rsh(pr * mu, 20);
        ni = mwi[n] + rsh(pi * mu, 20);
        if (nr != sat(nr, 24) || ni != sat(ni, 24)) n_sat++;
        mwr[n] = sat(nr, 24);
        mwi[n] = sat(ni, 24);
      end
    end else begin
      eer = 0; eei = 0;
    end
    begin
      exp_t x;
      x.yr = eyr; x.yi = eyi; x.er = eer; x.ei = eei; x.ad = ead; x.wr = mwr; x.wi = mwi;
      exq.push_back(x);
    end
  endtask

  initial begin
    for (int n = 0; n < L; n++) begin mwr[n] = 0; mwi[n] = 0; taps[n] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      step(14000, 400);
      if ($urandom % 3 == 0) begin @(negedge clk); v = 0; end
    end
    for (int i = 0; i < 200; i++) step(32000, 65535);   // drives weights into saturation
    @(negedge clk); v = 0;
    repeat (3) @(posedge clk);
    check(n_sat > 0, "weight saturation exercised");
    $display("tb_lms_filter_update: %0d saturated weight updates", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
