// interleaver: block interleaver for the coded bit stream.
//
// Collects the serial coded bits in blocks of INTLV_N = 4 (a ser2par),
// reorders each block with the fixed one-to-one map of modem_pkg (output bit
// j of a block is input bit INTLV_PERM[j]) and sends the block out serially
// again (a par2ser). Reordering spreads adjacent coded bits over different
// bit positions of the 16-QAM symbol. Block boundaries are counted from
// reset, so they line up with the symbol boundaries of the transmitter.
// Interface: in_valid/in_bit in, out_valid/out_bit out; one bit per cycle.
// Timing: each block leaves starting two cycles after its last bit arrives.
// The modem description calls for a random permutation over the input
// vector; the block length of 4 follows its deinterleaver, and the
// particular permutation is this design's choice.
module interleaver
  import modem_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit
);

  logic               blk_valid;
  logic [INTLV_N-1:0] blk, perm_blk;
  logic               busy_unused;

  ser2par #(.N(INTLV_N)) u_collect (
    .clk, .rst_n, .in_valid, .in_bit,
    .out_valid(blk_valid), .out_data(blk)
  );

  always_comb begin
    for (int j = 0; j < INTLV_N; j++) perm_blk[j] = blk[INTLV_PERM[j]];
  end

  par2ser #(.N(INTLV_N)) u_emit (
    .clk, .rst_n, .in_valid(blk_valid), .in_data(perm_blk),
    .out_valid, .out_bit, .busy(busy_unused)
  );

endmodule
