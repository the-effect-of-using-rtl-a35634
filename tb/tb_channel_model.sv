// tb_channel_model: self-checking test of the two-tap AWGN channel.
// Instance 1 (noise off) must give exactly round(0.1*x(k) + 0.9*x(k-1)) with
// the taps as Q.12 constants 410 and 3686, one cycle after the input.
// Instance 2 (default, noise on) sees the same symbols; its difference from
// instance 1 is the noise, whose mean must be near 0 and whose total power
// must be within 15 % of 1e-3 (40 dB below the 16-QAM symbol energy of 10).
module tb_channel_model;
  import modem_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, ov0, ov1;
  cplx_t x = '0, y0, y1;
  channel_model #(.NOISE_EN(1'b0)) u_clean (.clk, .rst_n, .in_valid(v), .in_sym(x), .out_valid(ov0), .out_sym(y0));
  channel_model                    u_dut   (.clk, .rst_n, .in_valid(v), .in_sym(x), .out_valid(ov1), .out_sym(y1));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  localparam int LEV [4] = '{-3, 3, -1, 1};
  cplx_t q [$];
  cplx_t prev = '0;
  int v_d = 0, n = 0;
  real sum_n = 0.0, sum_p = 0.0;

  function automatic int rnd(input int a, input int b);
    // round half up of (410*a + 3686*b) / 4096, computed with floor division
    int t;
    t = 410 * a + 3686 * b + 2048;
    return (t >= 0) ? t / 4096 : -((-t + 4095) / 4096);
  endfunction

  always @(posedge clk) if (rst_n) begin
    check(ov0 == v_d && ov1 == v_d, "latency one cycle");
    if (ov0) begin
      cplx_t c;
      c = q.pop_front();
      check(int'(y0.re) == rnd(c.re, prev.re), $sformatf("clean I sample %0d: %0d", n, y0.re));
      check(int'(y0.im) == rnd(c.im, prev.im), $sformatf("clean Q sample %0d: %0d", n, y0.im));
      prev = c;
      sum_n += real'(y1.re - y0.re) + real'(y1.im - y0.im);
      sum_p += (real'(y1.re - y0.re) ** 2 + real'(y1.im - y0.im) ** 2) / 16777216.0;
      n++;
    end
    v_d = v;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      v = (i % 4 == 0) || (i > 10000);
      x.re = sample_t'(LEV[$urandom % 4] * 4096);
      x.im = sample_t'(LEV[$urandom % 4] * 4096);
      if (i < 40) x.re = sample_t'($urandom % 60000 - 30000) >>> 1;
      if (v) q.push_back(x);
    end
    @(negedge clk); v = 0;
    repeat (3) @(posedge clk);
    begin
      real mean_lsb, pwr;
      mean_lsb = sum_n / (2.0 * n);
      pwr = sum_p / n;
      $display("tb_channel_model: %0d samples, noise mean %f LSB, power %g", n, mean_lsb, pwr);
      check(mean_lsb < 3.0 && mean_lsb > -3.0, "noise mean near zero");
      check(pwr > 0.85e-3 && pwr < 1.15e-3, "noise power for 40 dB SNR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
