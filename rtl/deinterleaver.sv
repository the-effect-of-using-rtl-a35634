// deinterleaver: inverse of the transmitter's block interleaver.
//
// Collects the serial bits coming out of the differential decoder in blocks
// of INTLV_N = 4 (a ser2par), puts each bit back in its original place with
// the inverse map of modem_pkg (output bit j of a block is input bit
// INTLV_INV[j]) and sends the block out serially (a par2ser). Block
// boundaries are counted from reset; because every received symbol yields
// exactly four bits, they stay aligned with the interleaver's blocks.
// Interface: in_valid/in_bit in, out_valid/out_bit out; one bit per cycle.
// Timing: each block leaves starting two cycles after its last bit arrives.
// The four-bit serial-to-parallel-reorder-serial structure follows the modem
// description; the permutation itself is this design's choice.
module deinterleaver
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
    for (int j = 0; j < INTLV_N; j++) perm_blk[j] = blk[INTLV_INV[j]];
  end

  par2ser #(.N(INTLV_N)) u_emit (
    .clk, .rst_n, .in_valid(blk_valid), .in_data(perm_blk),
    .out_valid, .out_bit, .busy(busy_unused)
  );

endmodule
