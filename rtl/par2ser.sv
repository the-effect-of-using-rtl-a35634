// par2ser: parallel-to-serial converter.
//
// Loads an N-bit word when in_valid is high and sends it out one bit per
// clock, bit 0 first, on the N cycles that follow. The modem uses it with
// N = 2 after the convolutional encoder (coded pair to bit stream) and with
// N = 4 after the 16-QAM demapper (symbol bits to bit stream), and inside the
// block interleavers.
//
// Interface: in_valid/in_data load a word; out_valid/out_bit carry the bit
// stream; busy is high while bits of the current word remain to be sent.
// Timing: the first bit appears one cycle after the load and bits follow on
// consecutive cycles, so words may arrive at most once every N cycles; an
// assertion flags a word that arrives while the previous one is still being
// sent. The LSB-first order is this design's choice and is used consistently
// by every converter of the modem.
module par2ser #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_data,
  output logic         out_valid,
  output logic         out_bit,
  output logic         busy
);

  logic [N-1:0]           sr;
  logic [$clog2(N+1)-1:0] left;   // bits still to send after the current one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      left      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else if (in_valid) begin
      out_bit   <= in_data[0];
      sr        <= in_data >> 1;
      left      <= ($clog2(N+1))'(N - 1);
      out_valid <= 1'b1;
    end else if (left != 0) begin
      out_bit   <= sr[0];
      sr        <= sr >> 1;
      left      <= left - 1'b1;
      out_valid <= 1'b1;
    end else begin
      out_valid <= 1'b0;
    end
  end

  assign busy = (left != 0);

  // A new word must not cut the previous one short.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> left == 0)
    else $error("par2ser: word loaded while %0d bits were still pending", left);

endmodule
