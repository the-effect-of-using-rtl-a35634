// tb_prbs_source: self-checking test of the PRBS-15 source.
// Checks that bits come only when requested, one cycle later; that the first
// 15 bits are the seed, MSB first; that the stream obeys the recurrence
// o[n] = o[n-14] ^ o[n-15] of x^15 + x^14 + 1; and that one full period of
// 32767 bits holds 16384 ones and then repeats.
module tb_prbs_source;
  localparam logic [14:0] SEED = 15'h5A3C;
  localparam int PER = 32767;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic ov, ob;
  always #5 clk = ~clk;

  prbs_source u_dut (.clk, .rst_n, .en, .out_valid(ov), .out_bit(ob));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit o [PER + 100];
  int n = 0, ones = 0, rec_err = 0, en_d = 0;

  always @(posedge clk) if (rst_n) begin
    if (ov != en_d) check(0, "out_valid must follow en by one cycle");
    en_d = en;
    if (ov) begin
      if (n < PER + 100) o[n] = ob;
      if (n < 15) check(ob == SEED[14 - n], $sformatf("seed bit %0d", n));
      if (n >= 15 && n < PER + 100 && ob != (o[n - 14] ^ o[n - 15])) rec_err++;
      if (n < PER) ones += ob;
      if (n >= PER && n < PER + 100) check(ob == o[n - PER], "period 32767");
      n++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < PER + 400; i++) begin
      @(negedge clk);
      en = (i < 50) ? (i % 3 == 0) : (i < 300 ? 1'($urandom) : 1'b1);
    end
    @(negedge clk); en = 0;
    repeat (3) @(posedge clk);
    check(rec_err == 0, $sformatf("recurrence errors %0d", rec_err));
    check(ones == 16384, $sformatf("ones in a period %0d", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PER + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
