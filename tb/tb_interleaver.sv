// tb_interleaver: self-checking test of the four-bit block interleaver.
// A random bit stream (continuous, then with idle cycles) goes in; every
// output block of four bits must be input block with output bit j taken from
// input bit {2,0,3,1}[j], a table written out here independently. Block k
// must start two cycles after its last input bit.
module tb_interleaver;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, b = 0, ov, ob;
  interleaver u_dut (.clk, .rst_n, .in_valid(v), .in_bit(b), .out_valid(ov), .out_bit(ob));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  localparam int MAP [4] = '{2, 0, 3, 1};
  bit in_s [$];
  int n_out = 0, cyc = 0;
  int blk_end [$];   // cycle of the last input bit of each block

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ov) begin
      int blk, j;
      blk = n_out / 4;
      j   = n_out % 4;
      check(ob == in_s[4 * blk + MAP[j]], $sformatf("block %0d bit %0d", blk, j));
      if (j == 0) check(cyc == blk_end[blk] + 2, $sformatf("block %0d start cycle", blk));
      n_out++;
    end
    if (v && (in_s.size() % 4 == 0)) blk_end.push_back(cyc);
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      // idle cycles only at block boundaries, as the modem never needs more
      v = (i < 400) ? 1'b1 : ((in_s.size() % 4 != 0) || ($urandom % 2 == 0));
      b = 1'($urandom);
      if (v) in_s.push_back(b);
    end
    while (in_s.size() % 4 != 0) begin
      @(negedge clk); v = 1; b = 1'($urandom); in_s.push_back(b);
    end
    @(negedge clk); v = 0;
    repeat (8) @(posedge clk);
    check(n_out == in_s.size(), $sformatf("bits out %0d of %0d", n_out, in_s.size()));
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
