// conv_encoder: rate-1/2, constraint-length-3 convolutional encoder.
//
// Two delay cells hold the last two information bits s1 (newest) and s2.
// For each input bit u it produces the pair
//   c0 = u ^ s1 ^ s2   (generator 7 octal, 111)
//   c1 = u ^ s1        (generator 6 octal, 110)
// as out_pair[0] and out_pair[1], the order of G = [7 6]. The encoder starts
// in the all-zero state after reset and is never flushed: it encodes an
// endless stream.
// Interface: in_valid/in_bit in, out_valid/out_pair out one cycle later; one
// bit per cycle may be accepted. Rate, K and generators follow the modem
// description; the bit order of the pair follows G = [7 6] rather than the
// reversed listing G1 = 110, G2 = 111 that also appears.
module conv_encoder
  import modem_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_bit,
  output logic  out_valid,
  output pair_t out_pair
);

  logic [1:0] st;     // {s1, s2}
  logic [2:0] reg3;   // {u, s1, s2}

  always_comb reg3 = {in_bit, st};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= '0;
      out_valid <= 1'b0;
      out_pair  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pair <= {parity3(reg3, CC_G1), parity3(reg3, CC_G0)};
        st       <= {in_bit, st[1]};
      end
    end
  end

endmodule
