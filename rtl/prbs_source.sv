// prbs_source: random binary information source.
//
// Stands for the random binary generator at the head of the transmitter. It
// is a 15-bit Fibonacci LFSR with polynomial x^15 + x^14 + 1 (PRBS-15,
// period 32767) that emits one bit for each cycle in which en is high.
// Interface: en requests a bit; out_valid/out_bit deliver it one cycle later.
// The modem description only asks for a random bit stream; the LFSR, its
// polynomial and the SEED parameter are this design's choice.
module prbs_source #(
  parameter logic [14:0] SEED = 15'h5A3C
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic out_valid,
  output logic out_bit
);

  logic [14:0] lfsr;
  logic        fb;

  always_comb fb = lfsr[14] ^ lfsr[13];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= (SEED == '0) ? 15'h1 : SEED;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        out_bit <= lfsr[14];
        lfsr    <= {lfsr[13:0], fb};
      end
    end
  end

endmodule
