// tb_viterbi_decoder: self-checking test of the hard-decision Viterbi decoder.
// Random information bits are encoded here (generators 7 and 6 octal, state
// zero at the start) and fed to the decoder one pair per cycle, with idle
// cycles in between for part of the run. Part 1 is error-free. In part 2 one
// coded bit in every 20 pairs is flipped at a random position; the code's
// free distance of 4 lets the decoder correct every such isolated error.
// Checks: output n equals information bit n; the first output comes one
// cycle after pair TB-1 (TB = 15), i.e. a latency of 15 pairs; the number of
// outputs; and that errors were actually injected and corrected.
module tb_viterbi_decoder;
  import modem_pkg::*;
  localparam int TB = 15;
  localparam int NB = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, ov, ob;
  pair_t p = '0;
  viterbi_decoder u_dut (.clk, .rst_n, .in_valid(v), .in_pair(p), .out_valid(ov), .out_bit(ob));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit u [NB];
  int n_in = 0, n_out = 0, injected = 0, cyc = 0, pair_cyc [NB];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ov) begin
      check(ob == u[n_out], $sformatf("decoded bit %0d", n_out));
      if (n_out == 0) check(cyc == pair_cyc[TB - 1] + 1, "first output after TB pairs");
      n_out++;
    end
    if (v) begin
      pair_cyc[n_in] = cyc;
      n_in++;
    end
  end

  initial begin
    bit s1 = 0, s2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NB; i++) begin
      pair_t c;
      u[i] = 1'($urandom);
      c[0] = u[i] ^ s1 ^ s2;
      c[1] = u[i] ^ s1;
      s2 = s1; s1 = u[i];
      if (i >= 1000 && i % 20 == 10) begin
        int k;
        k = int'($urandom % 2);
        c[k] = !c[k];
        injected++;
      end
      @(negedge clk);
      v = 1; p = c;
      if (i > 500 && i < 1500 && $urandom % 2 == 0) begin
        @(negedge clk); v = 0;
      end
    end
    @(negedge clk); v = 0;
    repeat (5) @(posedge clk);
    check(n_out == NB - TB + 1, $sformatf("outputs %0d", n_out));
    check(injected > 0, "errors injected");
    $display("tb_viterbi_decoder: %0d bits decoded, %0d coded-bit errors injected", n_out, injected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NB + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
