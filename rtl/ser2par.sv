// ser2par: serial-to-parallel converter.
//
// Shifts in one bit per in_valid and, after every N bits, presents them as one
// N-bit word with the first received bit in bit 0. The modem uses it with
// N = 4 before the 16-QAM mapper (bit stream to symbol bits), with N = 2
// before the Viterbi decoder (bit stream to coded pair) and inside the block
// interleavers.
//
// Interface: in_valid/in_bit carry the stream; out_valid pulses for one cycle
// with the completed word on out_data. Word boundaries are counted from reset.
// Timing: out_valid rises one cycle after the N-th bit of a word. One bit per
// cycle is accepted. The bit order (first bit to bit 0) is this design's
// choice, matching par2ser.
module ser2par #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         out_valid,
  output logic [N-1:0] out_data
);

  logic [N-1:0]           sr;
  logic [$clog2(N)-1:0]   cnt;   // bits of the current word received so far
  logic [N-1:0]           next_sr;

  // The new bit enters at the top so that, after N shifts, the first bit has
  // reached bit 0.
  always_comb next_sr = {in_bit, sr[N-1:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        sr <= next_sr;
        if (cnt == ($clog2(N))'(N - 1)) begin
          cnt       <= '0;
          out_data  <= next_sr;
          out_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
