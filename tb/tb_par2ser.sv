// tb_par2ser: self-checking test of par2ser for N = 2 (default) and N = 4.
// Random words are loaded every N cycles (back to back) and, for N = 4, also
// with idle gaps; every serial bit is compared with the expected bit of the
// word, bit 0 first, and the first bit must follow the load by one cycle.
module tb_par2ser;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       v2, ov2, b2, busy2;
  logic [1:0] d2;
  logic       v4, ov4, b4, busy4;
  logic [3:0] d4;

  par2ser u2 (.clk, .rst_n, .in_valid(v2), .in_data(d2), .out_valid(ov2), .out_bit(b2), .busy(busy2));
  par2ser #(.N(4)) u4 (.clk, .rst_n, .in_valid(v4), .in_data(d4), .out_valid(ov4), .out_bit(b4), .busy(busy4));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // Expected bit queues, filled when a word is loaded.
  bit q2 [$], q4 [$];
  int cyc = 0, n4 = 0;
  int first_cyc [$];  // expected cycle of bit 0 of each N=4 word

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ov2) begin
      check(q2.size() > 0, "N=2 unexpected bit");
      if (q2.size() > 0) check(b2 == q2.pop_front(), $sformatf("N=2 bit at cycle %0d", cyc));
    end
    if (ov4) begin
      check(q4.size() > 0, "N=4 unexpected bit");
      if (q4.size() > 0) check(b4 == q4.pop_front(), $sformatf("N=4 bit at cycle %0d", cyc));
      if (n4 % 4 == 0) check(cyc == first_cyc.pop_front(), "N=4 first bit one cycle after load");
      n4++;
    end
  end

  initial begin
    v2 = 0; v4 = 0; d2 = 0; d4 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      v2 = (i % 2 == 0);
      d2 = 2'($urandom);
      if (v2) for (int b = 0; b < 2; b++) q2.push_back(d2[b]);
      // N = 4: every 4 cycles in the first half, with random gaps later
      v4 = (i < 200) ? (i % 4 == 0) : ((i % 4 == 0) && ($urandom % 2 == 0) && !busy4);
      d4 = 4'($urandom);
      if (v4) begin
        for (int b = 0; b < 4; b++) q4.push_back(d4[b]);
        first_cyc.push_back(cyc + 2);
      end
    end
    @(negedge clk); v2 = 0; v4 = 0;
    repeat (10) @(posedge clk);
    check(q2.size() == 0 && q4.size() == 0, "all bits sent");
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
