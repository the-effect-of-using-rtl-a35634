// tb_qam16_demapper: self-checking test of the soft-bit demapper.
// Random samples over the whole range, the boundary points and the 16
// constellation points are demapped; every soft bit is compared with the
// soft-bit equations evaluated here in real arithmetic, and every hard bit
// with the sign of that value. The constellation points must give back the
// bits that select them in the mapper's Gray table.
module tb_qam16_demapper;
  import modem_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic v = 0, ov;
  cplx_t s = '0;
  logic [3:0] hb;
  logic signed [SAMPLE_W+1:0] sb [4];
  qam16_demapper u_dut (.clk, .rst_n, .in_valid(v), .in_sym(s), .out_valid(ov), .out_bits(hb), .out_soft(sb));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic real f_sign(input real y);
    if (y < -2.0) return 2.0 * (y + 1.0);
    else if (y < 2.0) return y;
    else return 2.0 * (y - 1.0);
  endfunction
  function automatic real f_mag(input real y);
    return (y <= 0.0) ? y + 2.0 : 2.0 - y;
  endfunction

  cplx_t q [$];
  logic [3:0] exp_pt [$];   // expected bits for constellation points, or 'x-free marker
  int v_d = 0;

  always @(posedge clk) if (rst_n) begin
    check(ov == v_d, "latency one cycle");
    if (ov) begin
      cplx_t x;
      real yr, yi, e [4];
      logic [3:0] pb;
      x  = q.pop_front();
      pb = exp_pt.pop_front();
      yr = real'(x.re) / 4096.0;
      yi = real'(x.im) / 4096.0;
      e[0] = f_sign(yr); e[1] = f_mag(yr); e[2] = f_sign(yi); e[3] = f_mag(yi);
      for (int i = 0; i < 4; i++) begin
        check(real'(sb[i]) == e[i] * 4096.0, $sformatf("soft b%0d for (%f,%f): %0d vs %f", i, yr, yi, sb[i], e[i] * 4096.0));
        check(hb[i] == (e[i] > 0.0), $sformatf("hard b%0d for (%f,%f)", i, yr, yi));
      end
      if (pb != 4'hF || (x.re == LVL_1 && x.im == LVL_1)) check(hb == pb, $sformatf("point bits %b vs %b", hb, pb));
    end
    v_d = v;
  end

  localparam int LEV [4] = '{-3, 3, -1, 1};
  task automatic send(input sample_t re, input sample_t im, input logic [3:0] pb);
    @(negedge clk);
    v = 1; s.re = re; s.im = im;
    q.push_back(s); exp_pt.push_back(pb);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 16; w++)
      send(sample_t'(LEV[w % 4] * 4096), sample_t'(LEV[w / 4] * 4096), 4'(w));
    // region boundaries
    foreach (LEV[i]) ;
    send(sample_t'(2 * 4096), sample_t'(-2 * 4096), 4'hF);
    send(sample_t'(0), sample_t'(1), 4'hF);
    send(sample_t'(-1), sample_t'(-2 * 4096 - 1), 4'hF);
    send(sample_t'(32767), sample_t'(-32768), 4'hF);
    for (int i = 0; i < 500; i++) begin
      send(sample_t'($urandom), sample_t'($urandom % 40000 - 20000), 4'hF);
      if ($urandom % 4 == 0) begin @(negedge clk); v = 0; end
    end
    @(negedge clk); v = 0;
    repeat (3) @(posedge clk);
    check(q.size() == 0, "all samples demapped");
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
