// lms_equalizer: complex linear adaptive equalizer trained with LMS.
//
// A tapped delay line (lms_shift_reg) holds the last L = 5 received complex
// samples x(k) ... x(k-L+1); the filter-and-update stage (lms_filter_update)
// forms the output and adapts the weights. The FIR output is
//   y(k) = sum_n w_n(k) * x(k-n)
// and, while training, the error against the desired (training) symbol d(k)
//   e(k) = d(k) - y(k)
// drives the complex LMS update
//   w_n(k+1) = w_n(k) + mu * e(k) * conj(x(k-n)).
// With train low, or no desired symbol, the weights are held and the filter
// keeps equalizing with them. The weights start at zero after reset.
//
// Number formats: samples and y, e and d are modem_pkg samples (Q.12);
// weights are COEF_W-bit signed with COEF_FRAC fractional bits; mu is an
// unsigned MU_W-bit fraction with MU_FRAC fractional bits (0.006 -> 393,
// 0.001 -> 66). Every rescaling rounds half up and every result saturates.
//
// Interface: in_valid/in_sym carry the received sample; d_valid/d_sym the
// desired symbol, sampled in the same cycle; train enables adaptation; mu is
// the step size. out_valid/out_sym/out_err (zero when not adapting) appear
// two cycles after in_valid: the first edge shifts the sample into the delay
// line, the second registers y and e and writes the updated weights, which
// are visible on w_re/w_im from that edge; adapted pulses with out_valid when
// they changed. One sample per cycle is accepted, since each update lands
// before the next sample's filter output is formed.
// The structure (five-sample shift register, FIR, error, weight update, step
// sizes 0.001 and 0.006) follows the modem description; the update is the
// standard complex LMS form, and the number formats, the hold behaviour
// outside training and the reset values are this design's choices.
module lms_equalizer
  import modem_pkg::*;
#(
  parameter int unsigned L         = 5,
  parameter int unsigned COEF_W    = 24,
  parameter int unsigned COEF_FRAC = 20,
  parameter int unsigned MU_W      = 16,
  parameter int unsigned MU_FRAC   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  cplx_t                    in_sym,
  input  logic                     d_valid,
  input  cplx_t                    d_sym,
  input  logic                     train,
  input  logic [MU_W-1:0]          mu,
  output logic                     out_valid,
  output cplx_t                    out_sym,
  output cplx_t                    out_err,
  output logic                     adapted,
  output logic signed [COEF_W-1:0] w_re [L],
  output logic signed [COEF_W-1:0] w_im [L]
);

  cplx_t taps [L];
  cplx_t d_q;
  logic  v_q, adapt_q;

  lms_shift_reg #(.L(L)) u_taps (
    .clk, .rst_n, .in_valid, .in_sym, .d_sym, .adapt(train && d_valid),
    .out_valid(v_q), .taps, .d_q, .adapt_q
  );

  lms_filter_update #(
    .L(L), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC), .MU_W(MU_W), .MU_FRAC(MU_FRAC)
  ) u_fu (
    .clk, .rst_n, .in_valid(v_q), .taps, .d_sym(d_q), .adapt(adapt_q), .mu,
    .out_valid, .out_sym, .out_err, .adapted, .w_re, .w_im
  );

endmodule
