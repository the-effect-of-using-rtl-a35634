// tb_lms_shift_reg: self-checking test of the equalizer's delay line.
// Random samples, desired symbols and adapt flags are shifted in with random
// idle cycles; after every shift the taps must hold the last five samples,
// newest at tap 0 (zero where fewer have arrived), and d_q/adapt_q the values
// given with the newest sample. out_valid must follow in_valid by one cycle.
module tb_lms_shift_reg;
  import modem_pkg::*;
  localparam int L = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, a = 0, ov, aq;
  cplx_t x = '0, d = '0, dq;
  cplx_t taps [L];
  lms_shift_reg u_dut (.clk, .rst_n, .in_valid(v), .in_sym(x), .d_sym(d), .adapt(a),
                       .out_valid(ov), .taps, .d_q(dq), .adapt_q(aq));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  cplx_t hist [$];
  cplx_t last_d;
  bit    last_a, v_d = 0;

  always @(posedge clk) if (rst_n) begin
    check(ov == v_d, "out_valid one cycle after in_valid");
    if (ov) begin
      for (int n = 0; n < L; n++) begin
        cplx_t e;
        e = (hist.size() > n) ? hist[hist.size() - 1 - n] : '0;
        check(taps[n] == e, $sformatf("tap %0d after %0d samples", n, hist.size()));
      end
      check(dq == last_d && aq == last_a, "desired symbol and adapt flag");
    end
    v_d = v;
    if (v) begin hist.push_back(x); last_d = d; last_a = a; end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      v = ($urandom % 3 != 0);
      x = cplx_t'($urandom);
      d = cplx_t'($urandom);
      a = 1'($urandom);
    end
    @(negedge clk); v = 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
