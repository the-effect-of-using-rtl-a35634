// qam16_demapper: soft-bit 16-QAM demapper.
//
// For an equalized sample y = yr + j*yi it computes the four soft bits
//   sb(b0) = 2(yr+1) if yr < -2,  yr if -2 <= yr < 2,  2(yr-1) if yr >= 2
//   sb(b1) = yr + 2  if yr <= 0,  2 - yr if yr > 0
// and sb(b2), sb(b3) the same way from yi. A positive soft bit means 1; the
// hard bits (soft bit > 0) pick the nearest constellation point and feed the
// hard-decision Viterbi decoder. Soft bits keep the sample's fractional bits
// and have two more integer bits so that they never overflow.
// Interface: in_valid/in_sym in; out_valid, out_bits[3:0] and out_soft[0..3]
// one cycle later.
// The equations follow the modem description; the treatment of yr = 2 (upper
// branch; both branches give 2 there), the sign convention and the timing
// are this design's choices.
module qam16_demapper
  import modem_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  cplx_t                             in_sym,
  output logic                              out_valid,
  output logic [3:0]                        out_bits,
  output logic signed [SAMPLE_W+1:0]        out_soft [4]
);

  typedef logic signed [SAMPLE_W+1:0] soft_t;

  localparam soft_t TWO = soft_t'(2 <<< SAMPLE_FRAC);
  localparam soft_t ONE = soft_t'(1 <<< SAMPLE_FRAC);

  // Soft bit of the sign bit (b0 / b2).
  function automatic soft_t sb_sign(input sample_t v);
    soft_t y;
    y = soft_t'(v);
    if (y < -TWO)     return (y + ONE) <<< 1;
    else if (y < TWO) return y;
    else              return (y - ONE) <<< 1;
  endfunction

  // Soft bit of the magnitude bit (b1 / b3).
  function automatic soft_t sb_mag(input sample_t v);
    soft_t y;
    y = soft_t'(v);
    if (y <= 0) return y + TWO;
    else        return TWO - y;
  endfunction

  soft_t sb [4];
  always_comb begin
    sb[0] = sb_sign(in_sym.re);
    sb[1] = sb_mag (in_sym.re);
    sb[2] = sb_sign(in_sym.im);
    sb[3] = sb_mag (in_sym.im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
      for (int i = 0; i < 4; i++) out_soft[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < 4; i++) begin
          out_soft[i] <= sb[i];
          out_bits[i] <= (sb[i] > 0);
        end
      end
    end
  end

endmodule
