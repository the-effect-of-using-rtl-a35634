// channel_model: two-path radio channel with additive white Gaussian noise.
//
// Models the multipath channel between transmitter and receiver as a two-tap
// FIR with real taps h0 = 0.1 (current symbol) and h1 = 0.9 (previous
// symbol), applied to I and Q alike, followed by AWGN at an SNR of 40 dB:
//   r(k) = h0*x(k) + h1*x(k-1) + n(k)
// The taps are Q.12 constants (410 and 3686); products are rounded back to
// the sample format. The dominant tap being the delayed one makes the
// channel non-minimum-phase, which the equalizer handles with its decision
// delay. The channel state and the noise generator advance once per symbol.
// Interface: in_valid/in_sym in; out_valid/out_sym one cycle later. With
// NOISE_EN = 0 the noise is left out, which makes the output exactly
// predictable for tests.
// Tap values and SNR follow the modem description; the tap order (0.1 first),
// the fixed-point format and the noise generator are this design's choices.
module channel_model
  import modem_pkg::*;
#(
  parameter int          H0         = 410,   // 0.1 in Q.12
  parameter int          H1         = 3686,  // 0.9 in Q.12
  parameter bit          NOISE_EN   = 1'b1,
  parameter int unsigned NOISE_GAIN = 159
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_sym,
  output logic  out_valid,
  output cplx_t out_sym
);

  typedef logic signed [SAMPLE_W+14:0] acc_t;

  cplx_t   prev;
  sample_t n_re, n_im;

  function automatic sample_t tap2(input sample_t a, input sample_t b);
    acc_t acc;
    acc = acc_t'(a) * acc_t'(H0) + acc_t'(b) * acc_t'(H1);
    return sample_t'((acc + acc_t'(1 <<< (SAMPLE_FRAC - 1))) >>> SAMPLE_FRAC);
  endfunction

  awgn_gen #(.GAIN(NOISE_GAIN)) u_noise (
    .clk, .rst_n, .step(in_valid), .noise_re(n_re), .noise_im(n_im)
  );

  // The noise sample added to symbol k is the one produced at symbol k-1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        prev       <= in_sym;
        out_sym.re <= tap2(in_sym.re, prev.re) + (NOISE_EN ? n_re : sample_t'(0));
        out_sym.im <= tap2(in_sym.im, prev.im) + (NOISE_EN ? n_im : sample_t'(0));
      end
    end
  end

endmodule
