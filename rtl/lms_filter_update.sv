// lms_filter_update: FIR output, error and weight update of the LMS equalizer.
//
// Holds the L complex weights. In a cycle with in_valid high it forms, from
// the delay-line taps x(k-n) and the weights w_n(k),
//   y(k)     = sum_n w_n(k) * x(k-n)
//   e(k)     = d(k) - y(k)
//   w_n(k+1) = w_n(k) + mu * e(k) * conj(x(k-n))        (when adapt is high)
// all combinationally, and registers y, e and the new weights on the edge.
// Without adapt the weights are held and out_err is zero. The weights clear
// to zero on reset.
// Number formats: taps, d, y, e are modem_pkg samples (Q.12); weights are
// COEF_W-bit signed with COEF_FRAC fractional bits; mu is unsigned with
// MU_FRAC fractional bits. Every rescaling rounds half up and every result
// saturates.
// Interface: in_valid/taps/d_sym/adapt/mu in; out_valid/out_sym/out_err/
// adapted and the weights w_re/w_im out, one cycle later. One input per cycle.
// The filter, the error feedback and the weight update (mu times the
// error-input product added to the old weight) follow the modem description;
// the conjugate form of the update and all number formats are this design's
// choices.
module lms_filter_update
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
  input  cplx_t                    taps [L],
  input  cplx_t                    d_sym,
  input  logic                     adapt,
  input  logic [MU_W-1:0]          mu,
  output logic                     out_valid,
  output cplx_t                    out_sym,
  output cplx_t                    out_err,
  output logic                     adapted,
  output logic signed [COEF_W-1:0] w_re [L],
  output logic signed [COEF_W-1:0] w_im [L]
);

  localparam int PROD_W = COEF_W + SAMPLE_W;                // w * x
  localparam int ACC_W  = PROD_W + 1 + $clog2(2 * L);       // sum of 2L products
  localparam int EX_W   = 2 * SAMPLE_W + 1;                 // e * conj(x) part
  localparam int UPD_W  = EX_W + MU_W + 1;                  // mu * e * conj(x)
  localparam int UPD_SH = 2 * SAMPLE_FRAC + MU_FRAC - COEF_FRAC;

  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [UPD_W-1:0]  upd_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Round-half-up right shift, then saturate to a sample.
  function automatic sample_t round_sat(input acc_t v, input int sh);
    acc_t r;
    r = (sh > 0) ? ((v + (acc_t'(1) <<< (sh - 1))) >>> sh) : v;
    if (r > acc_t'(2 ** (SAMPLE_W - 1) - 1))     return sample_t'(2 ** (SAMPLE_W - 1) - 1);
    else if (r < -acc_t'(2 ** (SAMPLE_W - 1)))   return sample_t'(-(2 ** (SAMPLE_W - 1)));
    else                                         return sample_t'(r);
  endfunction

  function automatic coef_t coef_add_sat(input coef_t w, input upd_t du);
    upd_t s;
    s = upd_t'(w) + du;
    if (s > upd_t'(2 ** (COEF_W - 1) - 1))       return coef_t'(2 ** (COEF_W - 1) - 1);
    else if (s < -upd_t'(2 ** (COEF_W - 1)))     return coef_t'(-(2 ** (COEF_W - 1)));
    else                                         return coef_t'(s);
  endfunction

    acc_t    acc_re, acc_im;
  sample_t y_re, y_im, e_re, e_im;
  upd_t    du_re [L], du_im [L];

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int n = 0; n < L; n++) begin
      acc_re += acc_t'(w_re[n]) * acc_t'(taps[n].re) - acc_t'(w_im[n]) * acc_t'(taps[n].im);
      acc_im += acc_t'(w_re[n]) * acc_t'(taps[n].im) + acc_t'(w_im[n]) * acc_t'(taps[n].re);
    end
    y_re = round_sat(acc_re, COEF_FRAC);
    y_im = round_sat(acc_im, COEF_FRAC);
    e_re = round_sat(acc_t'(d_sym.re) - acc_t'(y_re), 0);
    e_im = round_sat(acc_t'(d_sym.im) - acc_t'(y_im), 0);

    for (int n = 0; n < L; n++) begin
      upd_t p_re, p_im;
      p_re = upd_t'(e_re) * upd_t'(taps[n].re) + upd_t'(e_im) * upd_t'(taps[n].im);
      p_im = upd_t'(e_im) * upd_t'(taps[n].re) - upd_t'(e_re) * upd_t'(taps[n].im);
      p_re = p_re * upd_t'({1'b0, mu});
      p_im = p_im * upd_t'({1'b0, mu});
      du_re[n] = (p_re + (upd_t'(1) <<< (UPD_SH - 1))) >>> UPD_SH;
      du_im[n] = (p_im + (upd_t'(1) <<< (UPD_SH - 1))) >>> UPD_SH;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < L; n++) begin
        w_re[n] <= '0;
        w_im[n] <= '0;
      end
      out_valid <= 1'b0;
      out_sym   <= '0;
      out_err   <= '0;
      adapted   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      adapted   <= in_valid && adapt;
      if (in_valid) begin
        out_sym.re <= y_re;
        out_sym.im <= y_im;
        out_err.re <= adapt ? e_re : sample_t'(0);
        out_err.im <= adapt ? e_im : sample_t'(0);
        if (adapt) begin
          for (int n = 0; n < L; n++) begin
            w_re[n] <= coef_add_sat(w_re[n], du_re[n]);
            w_im[n] <= coef_add_sat(w_im[n], du_im[n]);
          end
        end
      end
    end
  end

  initial begin
    assert (UPD_SH >= 1) else $fatal(1, "lms_filter_update: COEF_FRAC too large for the update scaling");
  end

endmodule
