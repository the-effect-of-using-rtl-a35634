// diff_decoder: differential decoder.
//
// One delay cell and one XOR: each recovered bit is x_i = y_i XOR y_(i-1),
// undoing diff_encoder. The delay cell is cleared by reset (y_(-1) = 0), as
// in the encoder.
// Interface: in_valid/in_bit in, out_valid/out_bit out one cycle later; one
// bit per cycle. Structure follows the modem description; the reset value is
// this design's choice.
module diff_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit
);

  logic prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= 1'b0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_bit <= in_bit ^ prev;
        prev    <= in_bit;
      end
    end
  end

endmodule
