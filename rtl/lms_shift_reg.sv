// lms_shift_reg: tapped delay line of the LMS equalizer.
//
// Each received complex sample shifts in at tap 0 when in_valid is high and
// the oldest one drops out of tap L-1, so taps[n] holds x(k-n) after sample
// k. The desired symbol and the adapt decision that belong to the sample are
// latched on the same edge, so that the filter-and-update stage sees a
// consistent set, and out_valid marks the cycle after each shift.
// Interface: in_valid/in_sym/d_sym/adapt in; taps[0..L-1], d_q, adapt_q and
// out_valid out, all registered. All registers clear on reset.
// Selecting the last five samples with a shift register follows the modem
// description; latching the desired symbol here is this design's choice.
module lms_shift_reg
  import modem_pkg::*;
#(
  parameter int unsigned L = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_sym,
  input  cplx_t d_sym,
  input  logic  adapt,
  output logic  out_valid,
  output cplx_t taps [L],
  output cplx_t d_q,
  output logic  adapt_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < L; n++) taps[n] <= '0;
      d_q       <= '0;
      adapt_q   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        taps[0] <= in_sym;
        for (int n = 1; n < L; n++) taps[n] <= taps[n-1];
        d_q     <= d_sym;
        adapt_q <= adapt;
      end
    end
  end

endmodule
