// tb_qam16_mapper: self-checking test of the 16-QAM mapper.
// All 16 input words, then random ones, are mapped; each symbol is compared
// with the Gray table written out here (I from bits 1:0, Q from bits 3:2:
// 00 -> -3, 01 -> +3, 10 -> -1, 11 -> +1). Also checks the one-cycle
// latency, that every symbol lies on the {+-1, +-3} grid, and that
// neighbouring levels on each axis differ in exactly one bit.
module tb_qam16_mapper;
  import modem_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, ov;
  logic [3:0] d = 0;
  cplx_t s;
  qam16_mapper u_dut (.clk, .rst_n, .in_valid(v), .in_bits(d), .out_valid(ov), .out_sym(s));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  localparam int LEV [4] = '{-3, 3, -1, 1};
  logic [3:0] q [$];
  int v_d = 0;

  always @(posedge clk) if (rst_n) begin
    check(ov == v_d, "latency one cycle");
    if (ov) begin
      logic [3:0] w;
      w = q.pop_front();
      check(int'(s.re) == LEV[w[1:0]] * 4096, $sformatf("I of %b: %0d", w, s.re));
      check(int'(s.im) == LEV[w[3:2]] * 4096, $sformatf("Q of %b: %0d", w, s.im));
    end
    v_d = v;
  end

  initial begin
    // Gray property of the level table itself: -3, -1, +1, +3 in order
    int order [4] = '{0, 2, 3, 1};
    for (int i = 0; i < 3; i++)
      check($countones(2'(order[i]) ^ 2'(order[i + 1])) == 1, "Gray neighbours");
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      v = (i < 16) || ($urandom % 2 == 0);
      d = (i < 16) ? 4'(i) : 4'($urandom);
      if (v) q.push_back(d);
    end
    @(negedge clk); v = 0;
    repeat (3) @(posedge clk);
    check(q.size() == 0, "all words mapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
