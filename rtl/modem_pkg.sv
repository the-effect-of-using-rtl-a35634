// modem_pkg: types and constants shared by the 16-QAM baseband modem.
//
// Complex baseband samples are signed fixed point with SAMPLE_FRAC fractional
// bits, so the constellation levels +-1 and +-3 are +-4096 and +-12288. The
// code constants (rate 1/2, K = 3, generators 7 and 6 octal, traceback depth
// 5*K) and the constellation levels follow the modem description; the sample
// format, the interleaver permutation and the noise scaling are this design's
// own choices.
package modem_pkg;

  // ---- sample format ------------------------------------------------------
  localparam int SAMPLE_W    = 16;  // total bits of one real component
  localparam int SAMPLE_FRAC = 12;  // fractional bits: 1.0 == 4096

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  localparam sample_t LVL_1 = sample_t'(1 <<< SAMPLE_FRAC);  // +1.0
  localparam sample_t LVL_3 = sample_t'(3 <<< SAMPLE_FRAC);  // +3.0

  // ---- convolutional code -------------------------------------------------
  localparam int          CC_K  = 3;        // constraint length
  localparam logic [2:0]  CC_G0 = 3'o7;     // first coded bit:  u ^ s1 ^ s2
  localparam logic [2:0]  CC_G1 = 3'o6;     // second coded bit: u ^ s1
  localparam int          CC_TB = 5 * CC_K; // Viterbi traceback depth

  // ---- block interleaver --------------------------------------------------
  // Output bit j of a block is input bit INTLV_PERM[j]. The deinterleaver
  // applies the inverse map INTLV_INV.
  localparam int INTLV_N = 4;
  typedef int unsigned perm_t [INTLV_N];
  localparam perm_t INTLV_PERM = '{2, 0, 3, 1};
  localparam perm_t INTLV_INV  = '{1, 3, 0, 2};

  // Coded bit pair as produced by the encoder and consumed by the decoder:
  // bit 0 is the G0 output, bit 1 the G1 output.
  typedef logic [1:0] pair_t;

  // Parity of the bits of v selected by mask g.
  function automatic logic parity3(input logic [2:0] v, input logic [2:0] g);
    return ^(v & g);
  endfunction

endpackage
