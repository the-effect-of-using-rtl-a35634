// qam16_mapper: Gray-coded 16-QAM constellation mapper.
//
// Each four-bit word d[3:0] from the serial-to-parallel converter becomes one
// complex symbol: bits {d[1],d[0]} choose the in-phase level and bits
// {d[3],d[2]} the quadrature level, each through a four-entry ROM holding
// the levels -3, +3, -1, +1 (index 00, 01, 10, 11). Bit 0 (bit 2 for Q)
// gives the sign, 1 = positive; bit 1 (bit 3) gives the magnitude, 1 = inner
// level 1. Neighbouring levels therefore differ in one bit (Gray code), and
// the map is the one the soft-bit demapper inverts.
// Interface: in_valid/in_bits in, out_valid/out_sym one cycle later, levels
// in the modem_pkg sample format (1.0 = 4096).
// The level set {+-1, +-3}, the Gray code, two bits per axis and the ROM
// follow the modem description; the exact bit-to-level assignment is derived
// from its soft-bit equations, and the timing is this design's choice.
module qam16_mapper
  import modem_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [3:0] in_bits,
  output logic       out_valid,
  output cplx_t      out_sym
);

  // Level ROM, index {magnitude bit, sign bit}.
  sample_t level_rom [4];
  always_comb begin
    level_rom[0] = -LVL_3;
    level_rom[1] =  LVL_3;
    level_rom[2] = -LVL_1;
    level_rom[3] =  LVL_1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym.re <= level_rom[in_bits[1:0]];
        out_sym.im <= level_rom[in_bits[3:2]];
      end
    end
  end

endmodule
