// tb_diff_decoder: self-checking test of the differential decoder.
// Two decoders see the same random stream, one of them inverted. Each output
// must be the XOR of the current and previous input bit (0 before the
// first), and from the second bit on both decoders must agree, which is the
// protection against an inverted stream that differential coding provides.
module tb_diff_decoder;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, b = 0, ov, ob, ovn, obn;
  diff_decoder u_dut (.clk, .rst_n, .in_valid(v), .in_bit(b),  .out_valid(ov),  .out_bit(ob));
  diff_decoder u_inv (.clk, .rst_n, .in_valid(v), .in_bit(!b), .out_valid(ovn), .out_bit(obn));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit y [$];
  int n = 0;

  always @(posedge clk) if (rst_n) begin
    if (ov) begin
      check(ob == (y[n] ^ ((n > 0) ? y[n - 1] : 1'b0)), $sformatf("bit %0d", n));
      if (n > 0) check(obn == ob, $sformatf("inverted stream bit %0d", n));
      n++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      v = ($urandom % 3 != 0);
      b = 1'($urandom);
      if (v) y.push_back(b);
    end
    @(negedge clk); v = 0;
    repeat (3) @(posedge clk);
    check(n == y.size(), "all bits");
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
