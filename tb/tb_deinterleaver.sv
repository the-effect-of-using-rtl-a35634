// tb_deinterleaver: self-checking test of the four-bit block deinterleaver.
// Part 1 feeds a random stream straight in and checks every output block
// against the inverse map {1,3,0,2}, written out here. Part 2 runs the
// interleaver and the deinterleaver back to back and checks that the stream
// comes out unchanged.
module tb_deinterleaver;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, b = 0, ov, ob;
  logic iv, ib, cv, cb;
  deinterleaver u_dut (.clk, .rst_n, .in_valid(v), .in_bit(b), .out_valid(ov), .out_bit(ob));
  interleaver   u_il  (.clk, .rst_n, .in_valid(v), .in_bit(b), .out_valid(iv), .out_bit(ib));
  deinterleaver u_chk (.clk, .rst_n, .in_valid(iv), .in_bit(ib), .out_valid(cv), .out_bit(cb));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  localparam int INV [4] = '{1, 3, 0, 2};
  bit in_s [$];
  int n_out = 0, n_rt = 0;

  always @(posedge clk) if (rst_n) begin
    if (ov) begin
      check(ob == in_s[4 * (n_out / 4) + INV[n_out % 4]], $sformatf("direct bit %0d", n_out));
      n_out++;
    end
    if (cv) begin
      check(cb == in_s[n_rt], $sformatf("round trip bit %0d", n_rt));
      n_rt++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      v = (i < 300) ? 1'b1 : ((in_s.size() % 4 != 0) || ($urandom % 2 == 0));
      b = 1'($urandom);
      if (v) in_s.push_back(b);
    end
    while (in_s.size() % 4 != 0) begin
      @(negedge clk); v = 1; b = 1'($urandom); in_s.push_back(b);
    end
    @(negedge clk); v = 0;
    repeat (15) @(posedge clk);
    check(n_out == in_s.size() && n_rt == in_s.size(), "all bits out");
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
