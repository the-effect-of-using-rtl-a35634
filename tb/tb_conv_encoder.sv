// tb_conv_encoder: self-checking test of the K = 3 rate-1/2 encoder.
// A random bit stream with idle cycles is encoded; each pair is compared with
// a reference built from the explicit input history: c0 = u(n)^u(n-1)^u(n-2)
// (generator 7) and c1 = u(n)^u(n-1) (generator 6), history zero at reset.
// Also checks the one-cycle latency.
module tb_conv_encoder;
  import modem_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, b = 0, ov;
  pair_t op;
  conv_encoder u_dut (.clk, .rst_n, .in_valid(v), .in_bit(b), .out_valid(ov), .out_pair(op));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit u [$];
  int n_out = 0, v_d = 0;

  always @(posedge clk) if (rst_n) begin
    check(ov == v_d, "latency one cycle");
    if (ov) begin
      bit u0, u1, u2;
      u0 = u[n_out];
      u1 = (n_out >= 1) ? u[n_out - 1] : 1'b0;
      u2 = (n_out >= 2) ? u[n_out - 2] : 1'b0;
      check(op[0] == (u0 ^ u1 ^ u2), $sformatf("c0 of bit %0d", n_out));
      check(op[1] == (u0 ^ u1), $sformatf("c1 of bit %0d", n_out));
      n_out++;
    end
    v_d = v;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      v = ($urandom % 4 != 0);
      b = 1'($urandom);
      if (v) u.push_back(b);
    end
    @(negedge clk); v = 0;
    repeat (3) @(posedge clk);
    check(n_out == u.size(), "all bits encoded");
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
