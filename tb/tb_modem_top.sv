// tb_modem_top: end-to-end test of the 16-QAM modem at its default parameters.
//
// Runs the source continuously with the equalizer first in training mode
// (mu = 0.006) and then with its weights held. Checks, against values the
// testbench derives itself from the transmitted data:
//  * symbol rate: one 16-QAM symbol every 4 cycles, one decoded bit every
//    2 cycles in steady state;
//  * hard symbol decisions of the demapper against the transmitted symbol
//    TRAIN_DELAY symbols earlier, error-free once converged (and wrong at
//    least sometimes before convergence, which shows the equalizer matters);
//  * every decoded bit after convergence equals information bit
//    n - 2*TRAIN_DELAY;
//  * the training error power falls by more than 20 dB.
// Mechanisms counted (each must occur): weight updates, held-weight symbols,
// the training-to-hold mode switch, pre-convergence symbol errors.
module tb_modem_top;
  import modem_pkg::*;

  localparam int D          = 5;      // default TRAIN_DELAY of modem_top
  localparam int N_TRAIN    = 800;    // symbols in training mode
  localparam int N_HOLD     = 1200;   // symbols with weights held
  localparam int N_SYM      = N_TRAIN + N_HOLD;
  localparam int CONV_SYM   = 400;    // symbols allowed for convergence
  localparam int MAXB       = 2 * N_SYM + 64;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, train = 1'b0;
  logic [15:0] mu = 16'd393;
  logic src_valid, src_bit, tx_valid, rx_valid, eq_valid, eq_adapted;
  logic demap_valid, dec_valid, dec_bit;
  cplx_t tx_sym, rx_sym, eq_sym, eq_err;
  logic [3:0] demap_bits;
  logic signed [23:0] eq_w_re [5], eq_w_im [5];
  logic signed [SAMPLE_W+1:0] demap_soft [4];

  modem_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---- reference records ----
  bit        src_mem [MAXB];
  logic [3:0] tx_bits_mem [N_SYM + 16];
  int n_src = 0, n_tx = 0, n_eq = 0, n_demap = 0, n_dec = 0;
  int cyc = 0, last_tx_cyc = -1, last_dec_cyc = -1;
  int n_adapt = 0, n_hold = 0, n_switch = 0, pre_err = 0;
  real mse_early = 0.0, mse_late = 0.0;
  logic train_d = 1'b0;

  function automatic logic [3:0] sym_bits(input cplx_t s);
    sym_bits[0] = s.re > 0;
    sym_bits[1] = (s.re == LVL_1) || (s.re == -LVL_1);
    sym_bits[2] = s.im > 0;
    sym_bits[3] = (s.im == LVL_1) || (s.im == -LVL_1);
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    train_d <= train;
    if (train_d && !train) n_switch++;
    if (src_valid) begin
      if (n_src < MAXB) src_mem[n_src] = src_bit;
      n_src++;
    end
    if (tx_valid) begin
      if (last_tx_cyc >= 0) check(cyc - last_tx_cyc == 4, $sformatf("symbol spacing %0d", cyc - last_tx_cyc));
      last_tx_cyc = cyc;
      if (n_tx < N_SYM + 16) tx_bits_mem[n_tx] = sym_bits(tx_sym);
      n_tx++;
    end
    if (eq_valid) begin
      real p;
      p = (real'(eq_err.re) ** 2 + real'(eq_err.im) ** 2) / 16777216.0;
      if (eq_adapted) begin
        n_adapt++;
        if (n_adapt <= 50) mse_early += p;
        if (n_adapt > N_TRAIN - 60 && n_adapt <= N_TRAIN - 10) mse_late += p;
      end else if (n_eq >= N_TRAIN) n_hold++;
      n_eq++;
    end
    if (demap_valid) begin
      if (n_demap >= D) begin
        logic [3:0] exp_b;
        exp_b = tx_bits_mem[n_demap - D];
        if (n_demap < CONV_SYM) begin
          if (demap_bits != exp_b) pre_err++;
        end else
          check(demap_bits == exp_b, $sformatf("symbol %0d bits %h expected %h", n_demap, demap_bits, exp_b));
      end
      n_demap++;
    end
    if (dec_valid) begin
      if (n_dec > 2 * CONV_SYM + 40) begin
        check(cyc - last_dec_cyc == 2, $sformatf("decoded bit spacing %0d", cyc - last_dec_cyc));
        check(dec_bit == src_mem[n_dec - 2 * D], $sformatf("decoded bit %0d", n_dec));
      end
      last_dec_cyc = cyc;
      n_dec++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    train = 1'b1;
    run   = 1'b1;
    wait (n_eq == N_TRAIN);
    @(negedge clk);
    train = 1'b0;
    wait (n_eq == N_SYM);
    run = 1'b0;
    repeat (200) @(posedge clk);

    check(n_adapt > 0, "weight updates happened");
    check(n_hold > 0, "held-weight symbols happened");
    check(n_switch > 0, "training-to-hold switch happened");
    check(pre_err > 0, "pre-convergence symbol errors happened");
    check(mse_late * 100.0 < mse_early,
          $sformatf("training error power early %f late %f", mse_early / 50.0, mse_late / 50.0));
    check(n_dec > 2 * N_SYM - 2 * D - 40, $sformatf("decoded %0d bits", n_dec));
    $display("tb_modem_top: symbols %0d, updates %0d, held %0d, switches %0d, pre-conv symbol errors %0d, decoded bits %0d",
             n_tx, n_adapt, n_hold, n_switch, pre_err, n_dec);
    $display("tb_modem_top: mean |e|^2 first 50 updates %g, late %g", mse_early / 50.0, mse_late / 50.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (4 * N_SYM + 5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
