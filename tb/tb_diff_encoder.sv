// tb_diff_encoder: self-checking test of the differential encoder.
// Random bits with idle cycles; each output must equal the XOR of the input
// bit with the previous output (0 before the first), one cycle later.
module tb_diff_encoder;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, b = 0, ov, ob;
  diff_encoder u_dut (.clk, .rst_n, .in_valid(v), .in_bit(b), .out_valid(ov), .out_bit(ob));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit x [$];
  bit y_prev = 0;
  int n = 0, v_d = 0;

  always @(posedge clk) if (rst_n) begin
    check(ov == v_d, "latency one cycle");
    if (ov) begin
      check(ob == (y_prev ^ x[n]), $sformatf("bit %0d", n));
      y_prev = y_prev ^ x[n];
      n++;
    end
    v_d = v;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      v = ($urandom % 3 != 0);
      b = 1'($urandom);
      if (v) x.push_back(b);
    end
    @(negedge clk); v = 0;
    repeat (3) @(posedge clk);
    check(n == x.size(), "all bits");
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
