// tb_ser2par: self-checking test of ser2par for N = 4 (default) and N = 2.
// A random bit stream, with random idle cycles, is fed to both instances;
// each completed word must hold the next N stream bits with the first bit in
// bit 0, and must appear one cycle after its last bit.
module tb_ser2par;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v, b;
  logic ov4, ov2;
  logic [3:0] d4;
  logic [1:0] d2;

  ser2par u4 (.clk, .rst_n, .in_valid(v), .in_bit(b), .out_valid(ov4), .out_data(d4));
  ser2par #(.N(2)) u2 (.clk, .rst_n, .in_valid(v), .in_bit(b), .out_valid(ov2), .out_data(d2));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit stream [$];
  int n_in = 0, w4 = 0, w2 = 0, last_in_cyc = 0, cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ov4) begin
      logic [3:0] e;
      for (int i = 0; i < 4; i++) e[i] = stream[4 * w4 + i];
      check(d4 == e, $sformatf("N=4 word %0d: %h expected %h", w4, d4, e));
      check(n_in == 4 * (w4 + 1) && last_in_cyc == cyc - 1, "N=4 word timing");
      w4++;
    end
    if (ov2) begin
      logic [1:0] e;
      for (int i = 0; i < 2; i++) e[i] = stream[2 * w2 + i];
      check(d2 == e, $sformatf("N=2 word %0d: %h expected %h", w2, d2, e));
      w2++;
    end
    if (v) begin
      n_in++;
      last_in_cyc = cyc;
    end
  end

  initial begin
    v = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      v = (i < 300) ? 1'b1 : ($urandom % 3 != 0);
      b = 1'($urandom);
      if (v) stream.push_back(b);
    end
    @(negedge clk); v = 0;
    repeat (5) @(posedge clk);
    check(w4 == stream.size() / 4 && w2 == stream.size() / 2, "word counts");
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
