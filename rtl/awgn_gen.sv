// awgn_gen: approximately Gaussian noise for the channel model.
//
// Two independent 32-bit xorshift generators (shifts 13, 17, 5), one per
// axis, advance whenever step is high. The four bytes of a generator's state,
// read as signed numbers, are summed (central-limit approximation of a
// Gaussian, standard deviation 256/sqrt(3) = 147.8) and scaled by GAIN/256.
// With GAIN = 159 the standard deviation per axis is 91.8 LSB = 0.0224 in the
// modem sample format, i.e. a total noise power of 1.0e-3 against the 16-QAM
// mean symbol energy of 10: an SNR of 40 dB.
// Interface: step advances both generators; noise_re/noise_im are the
// registered noise samples of the last step. Generator and scaling are this
// design's choices; only the 40 dB SNR comes from the modem description.
module awgn_gen
  import modem_pkg::*;
#(
  parameter logic [31:0] SEED_RE = 32'h1234_5678,
  parameter logic [31:0] SEED_IM = 32'h9E37_79B9,
  parameter int unsigned GAIN    = 159
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    step,
  output sample_t noise_re,
  output sample_t noise_im
);

  logic [31:0] st_re, st_im;

  function automatic logic [31:0] xorshift(input logic [31:0] s);
    logic [31:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  // Sum of the four signed bytes, scaled by GAIN/256 with rounding.
  function automatic sample_t shape(input logic [31:0] s);
    logic signed [9:0]  sum;
    logic signed [19:0] prod;
    sum  = 10'(signed'(s[7:0])) + 10'(signed'(s[15:8]))
         + 10'(signed'(s[23:16])) + 10'(signed'(s[31:24]));
    prod = 20'(sum) * 20'(signed'({1'b0, 9'(GAIN)}));
    return sample_t'((prod + 20'sd128) >>> 8);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_re    <= (SEED_RE == '0) ? 32'h1 : SEED_RE;
      st_im    <= (SEED_IM == '0) ? 32'h1 : SEED_IM;
      noise_re <= '0;
      noise_im <= '0;
    end else if (step) begin
      st_re    <= xorshift(st_re);
      st_im    <= xorshift(st_im);
      noise_re <= shape(xorshift(st_re));
      noise_im <= shape(xorshift(st_im));
    end
  end

endmodule
