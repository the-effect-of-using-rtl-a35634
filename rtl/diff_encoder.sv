// diff_encoder: differential encoder.
//
// One delay cell and one XOR: each transmitted bit is y_i = y_(i-1) XOR x_i,
// so information sits in the change between consecutive bits and a receiver
// that sees the whole stream inverted still recovers it. The delay cell is
// cleared by reset (y_(-1) = 0).
// Interface: in_valid/in_bit in, out_valid/out_bit out one cycle later; one
// bit per cycle. Structure and equation follow the modem description; the
// reset value is this design's choice.
module diff_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bit <= out_bit ^ in_bit;  // out_bit is y_(i-1)
    end
  end

endmodule
