// tb_modem_step_size: training-time comparison of the two LMS step sizes.
//
// Two complete modems run side by side on the same data and noise, one
// trained with mu = 0.006 and one with mu = 0.001, both in training mode for
// the whole run. For each, the testbench derives the hard symbol decisions
// it expects from the transmitted symbols (delayed by the equalizer's decision
// delay of 5 symbols) and the mean training-error power per 50-symbol block.
// Checks: the larger step size gets below an error power of 0.01 sooner;
// after convergence both make no symbol errors and decode every information
// bit correctly; the smaller step size ends with the lower error power, the
// trade-off between training speed and residual error.
module tb_modem_step_size;
  import modem_pkg::*;

  localparam int D     = 5;
  localparam int N_SYM = 3000;
  localparam int BLK   = 50;
  localparam int NBLK  = N_SYM / BLK;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, train = 1'b0;
  always #5 clk = ~clk;

  logic src_valid [2], src_bit [2], tx_valid [2], rx_valid [2], eq_valid [2], eq_adapted [2];
  logic demap_valid [2], dec_valid [2], dec_bit [2];
  cplx_t tx_sym [2], rx_sym [2], eq_sym [2], eq_err [2];
  logic [3:0] demap_bits [2];
  logic signed [23:0] w_re [2][5], w_im [2][5];
  logic signed [SAMPLE_W+1:0] sbits [2][4];
  logic [15:0] mu_v [2] = '{16'd393, 16'd66};

  for (genvar g = 0; g < 2; g++) begin : g_modem
    modem_top dut (
      .clk, .rst_n, .run, .train, .mu(mu_v[g]),
      .src_valid(src_valid[g]), .src_bit(src_bit[g]), .tx_valid(tx_valid[g]), .tx_sym(tx_sym[g]),
      .rx_valid(rx_valid[g]), .rx_sym(rx_sym[g]), .eq_valid(eq_valid[g]), .eq_sym(eq_sym[g]),
      .eq_err(eq_err[g]), .eq_adapted(eq_adapted[g]), .eq_w_re(w_re[g]), .eq_w_im(w_im[g]),
      .demap_valid(demap_valid[g]), .demap_bits(demap_bits[g]), .demap_soft(sbits[g]),
      .dec_valid(dec_valid[g]), .dec_bit(dec_bit[g])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [3:0] sym_bits(input cplx_t s);
    sym_bits[0] = s.re > 0;
    sym_bits[1] = (s.re == LVL_1) || (s.re == -LVL_1);
    sym_bits[2] = s.im > 0;
    sym_bits[3] = (s.im == LVL_1) || (s.im == -LVL_1);
  endfunction

  bit         src_mem [2][2 * N_SYM + 64];
  logic [3:0] txb [2][N_SYM + 16];
  int n_src [2] = '{0, 0}, n_tx [2] = '{0, 0}, n_eq [2] = '{0, 0}, n_dm [2] = '{0, 0}, n_dec [2] = '{0, 0};
  real blk_pwr [2][NBLK];
  int  blk_err [2][NBLK];
  int  dec_err_late [2] = '{0, 0};

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < 2; g++) begin
      if (src_valid[g]) begin src_mem[g][n_src[g]] = src_bit[g]; n_src[g]++; end
      if (tx_valid[g] && n_tx[g] < N_SYM + 16) begin txb[g][n_tx[g]] = sym_bits(tx_sym[g]); n_tx[g]++; end
      if (eq_valid[g]) begin
        if (eq_adapted[g] && n_eq[g] / BLK < NBLK)
          blk_pwr[g][n_eq[g] / BLK] += (real'(eq_err[g].re) ** 2 + real'(eq_err[g].im) ** 2) / 16777216.0 / BLK;
        n_eq[g]++;
      end
      if (demap_valid[g]) begin
        if (n_dm[g] >= D && n_dm[g] / BLK < NBLK && demap_bits[g] != txb[g][n_dm[g] - D])
          blk_err[g][n_dm[g] / BLK]++;
        n_dm[g]++;
      end
      if (dec_valid[g]) begin
        if (n_dec[g] > 2 * (N_SYM / 2) && n_dec[g] < 2 * N_SYM - 40 && dec_bit[g] != src_mem[g][n_dec[g] - 2 * D])
          dec_err_late[g]++;
        n_dec[g]++;
      end
    end
  end

  initial begin
    int t_conv [2];
    for (int g = 0; g < 2; g++) for (int b = 0; b < NBLK; b++) begin blk_pwr[g][b] = 0.0; blk_err[g][b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    train = 1'b1;
    run   = 1'b1;
    wait (n_eq[0] == N_SYM && n_eq[1] == N_SYM);
    run = 1'b0;
    repeat (200) @(posedge clk);
    for (int g = 0; g < 2; g++) begin
      int last_err_blk;
      real late;
      t_conv[g] = 1 << 30;
      for (int b = NBLK - 1; b >= 1; b--) if (blk_pwr[g][b] > 0.01) begin t_conv[g] = (b + 1) * BLK; break; end
      if (blk_pwr[g][1] <= 0.01) t_conv[g] = BLK;
      last_err_blk = -1;
      for (int b = 0; b < NBLK; b++) if (blk_err[g][b] > 0) last_err_blk = b;
      late = 0.0;
      for (int b = NBLK - 10; b < NBLK; b++) late += blk_pwr[g][b] / 10.0;
      $display("tb_modem_step_size: mu=%s error power below 0.01 after %0d symbols, last symbol error in block %0d, final error power %g, late decoded-bit errors %0d",
               g == 0 ? "0.006" : "0.001", t_conv[g], last_err_blk, late, dec_err_late[g]);
      check(t_conv[g] < N_SYM / 2, "converges within half the run");
      check(last_err_blk < NBLK / 2, "no symbol errors in the second half");
      check(dec_err_late[g] == 0, "no decoded-bit errors in the second half");
      blk_pwr[g][0] = late;   // reuse as final power
    end
    check(t_conv[0] < t_conv[1], "mu = 0.006 trains faster than mu = 0.001");
    check(blk_pwr[1][0] < blk_pwr[0][0], "mu = 0.001 ends with the lower error power");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * N_SYM + 5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
