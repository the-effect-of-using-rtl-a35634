// modem_top: 16-QAM baseband SDR modem with an LMS channel equalizer.
//
// Transmitter: random bit source -> rate-1/2 K=3 convolutional encoder ->
// 2:1 parallel-to-serial -> block interleaver -> differential encoder ->
// 1:4 serial-to-parallel -> Gray 16-QAM mapper.
// Channel: two-tap multipath (0.1, 0.9) plus AWGN at 40 dB SNR.
// Receiver: 5-tap complex LMS equalizer (trained with the transmitted
// symbols, delayed by TRAIN_DELAY) -> soft-bit 16-QAM demapper -> 4:1
// parallel-to-serial -> differential decoder -> block deinterleaver -> 1:2
// serial-to-parallel -> hard-decision Viterbi decoder.
//
// Everything runs on one clock with valid strobes and no back-pressure.
// While run is high the source emits one information bit every second cycle,
// which keeps the serial links busy every cycle: two coded bits per
// information bit, one 16-QAM symbol every four cycles. train enables the
// equalizer's weight updates (training mode); with train low the weights are
// held. mu is the LMS step size as an unsigned Q.16 fraction (0.006 -> 393).
// The n-th decoded bit is information bit n - 2*TRAIN_DELAY: the equalizer's
// decision delay shifts the received stream by TRAIN_DELAY symbols, i.e.
// 2*TRAIN_DELAY information bits; decoding is not valid until the equalizer
// has converged.
// The chain of blocks and their parameters follow the modem description; the
// clocking, the handshakes, the rate control and the delay of the training
// reference are this design's choices.
module modem_top
  import modem_pkg::*;
#(
  parameter int unsigned TRAIN_DELAY = 5,
  parameter bit          NOISE_EN    = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        train,
  input  logic [15:0] mu,
  // transmitter
  output logic        src_valid,
  output logic        src_bit,
  output logic        tx_valid,
  output cplx_t       tx_sym,
  // channel output
  output logic        rx_valid,
  output cplx_t       rx_sym,
  // equalizer
  output logic        eq_valid,
  output cplx_t       eq_sym,
  output cplx_t       eq_err,
  output logic        eq_adapted,
  output logic signed [23:0] eq_w_re [5],
  output logic signed [23:0] eq_w_im [5],
  // receiver
  output logic        demap_valid,
  output logic [3:0]  demap_bits,
  output logic signed [SAMPLE_W+1:0] demap_soft [4],
  output logic        dec_valid,
  output logic        dec_bit
);

  // ---------------- rate control ----------------
  logic phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else        phase <= run ? ~phase : 1'b0;
  end

  // ---------------- transmitter ----------------
  logic  enc_valid;
  pair_t enc_pair;
  logic  txs_valid, txs_bit, txs_busy;
  logic  il_valid, il_bit;
  logic  de_valid, de_bit;
  logic  sp_valid;
  logic [3:0] sp_bits;

  prbs_source u_src (
    .clk, .rst_n, .en(run && !phase), .out_valid(src_valid), .out_bit(src_bit)
  );

  conv_encoder u_enc (
    .clk, .rst_n, .in_valid(src_valid), .in_bit(src_bit),
    .out_valid(enc_valid), .out_pair(enc_pair)
  );

  par2ser #(.N(2)) u_tx_p2s (
    .clk, .rst_n, .in_valid(enc_valid), .in_data(enc_pair),
    .out_valid(txs_valid), .out_bit(txs_bit), .busy(txs_busy)
  );

  interleaver u_intlv (
    .clk, .rst_n, .in_valid(txs_valid), .in_bit(txs_bit),
    .out_valid(il_valid), .out_bit(il_bit)
  );

  diff_encoder u_denc (
    .clk, .rst_n, .in_valid(il_valid), .in_bit(il_bit),
    .out_valid(de_valid), .out_bit(de_bit)
  );

  ser2par #(.N(4)) u_tx_s2p (
    .clk, .rst_n, .in_valid(de_valid), .in_bit(de_bit),
    .out_valid(sp_valid), .out_data(sp_bits)
  );

  qam16_mapper u_map (
    .clk, .rst_n, .in_valid(sp_valid), .in_bits(sp_bits),
    .out_valid(tx_valid), .out_sym(tx_sym)
  );

  // ---------------- channel ----------------
  channel_model #(.NOISE_EN(NOISE_EN)) u_chan (
    .clk, .rst_n, .in_valid(tx_valid), .in_sym(tx_sym),
    .out_valid(rx_valid), .out_sym(rx_sym)
  );

  // ---------------- equalizer ----------------
  logic  ref_valid;
  cplx_t ref_sym;

  training_ref #(.DELAY(TRAIN_DELAY)) u_ref (
    .clk, .rst_n, .tx_valid, .tx_sym, .rx_valid,
    .ref_valid, .ref_sym
  );

  lms_equalizer u_eq (
    .clk, .rst_n, .in_valid(rx_valid), .in_sym(rx_sym),
    .d_valid(ref_valid), .d_sym(ref_sym), .train, .mu,
    .out_valid(eq_valid), .out_sym(eq_sym), .out_err(eq_err),
    .adapted(eq_adapted), .w_re(eq_w_re), .w_im(eq_w_im)
  );

  // ---------------- receiver ----------------
  logic rxs_valid, rxs_bit, rxs_busy;
  logic dd_valid, dd_bit;
  logic di_valid, di_bit;
  logic pr_valid;
  pair_t pr_pair;

  qam16_demapper u_demap (
    .clk, .rst_n, .in_valid(eq_valid), .in_sym(eq_sym),
    .out_valid(demap_valid), .out_bits(demap_bits), .out_soft(demap_soft)
  );

  par2ser #(.N(4)) u_rx_p2s (
    .clk, .rst_n, .in_valid(demap_valid), .in_data(demap_bits),
    .out_valid(rxs_valid), .out_bit(rxs_bit), .busy(rxs_busy)
  );

  diff_decoder u_ddec (
    .clk, .rst_n, .in_valid(rxs_valid), .in_bit(rxs_bit),
    .out_valid(dd_valid), .out_bit(dd_bit)
  );

  deinterleaver u_deintlv (
    .clk, .rst_n, .in_valid(dd_valid), .in_bit(dd_bit),
    .out_valid(di_valid), .out_bit(di_bit)
  );

  ser2par #(.N(2)) u_rx_s2p (
    .clk, .rst_n, .in_valid(di_valid), .in_bit(di_bit),
    .out_valid(pr_valid), .out_data(pr_pair)
  );

  viterbi_decoder u_vit (
    .clk, .rst_n, .in_valid(pr_valid), .in_pair(pr_pair),
    .out_valid(dec_valid), .out_bit(dec_bit)
  );

endmodule
