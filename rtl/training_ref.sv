// training_ref: training-symbol reference for the LMS equalizer.
//
// The equalizer is trained with the known transmitted symbols, delayed by
// DELAY symbols so that the non-minimum-phase channel can be inverted with a
// causal filter. This block keeps the last DEPTH transmitted symbols in a
// small ring buffer written by tx_valid, counts the received samples
// (rx_valid), and for received sample k presents transmitted symbol k-DELAY
// combinationally in the same cycle; ref_valid is low for the first DELAY
// samples, when no such symbol exists. It relies on the transmitter being at
// most DEPTH-DELAY symbols ahead of the receiver, which an assertion checks.
// Interface: tx_valid/tx_sym write, rx_valid advances the read side,
// ref_valid/ref_sym are valid in the cycle of rx_valid.
// Training with the transmitted symbols follows the modem description (the
// desired signal x of its equalizer); the delay, the buffer and its depth are
// this design's choices.
module training_ref
  import modem_pkg::*;
#(
  parameter int unsigned DELAY = 5,
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tx_valid,
  input  cplx_t tx_sym,
  input  logic  rx_valid,
  output logic  ref_valid,
  output cplx_t ref_sym
);

  localparam int AW = $clog2(DEPTH);

  cplx_t         mem [DEPTH];
  logic [AW-1:0] wr_ptr;
  logic [31:0]   tx_cnt, rx_cnt;
  logic [AW-1:0] rd_ptr;

  always_comb begin
    rd_ptr    = AW'(rx_cnt - DELAY);
    ref_sym   = mem[rd_ptr];
    ref_valid = rx_valid && (rx_cnt >= DELAY);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      tx_cnt <= '0;
      rx_cnt <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (tx_valid) begin
        mem[wr_ptr] <= tx_sym;
        wr_ptr      <= wr_ptr + 1'b1;
        tx_cnt      <= tx_cnt + 1;
      end
      if (rx_valid) rx_cnt <= rx_cnt + 1;
    end
  end

  // The symbol read must still be in the buffer and already written.
  a_window: assert property (@(posedge clk) disable iff (!rst_n)
      ref_valid |-> (tx_cnt > rx_cnt - DELAY) && (tx_cnt - (rx_cnt - DELAY) <= DEPTH))
    else $error("training_ref: reference symbol outside the buffer");

  initial assert (DEPTH == 2 ** AW && DELAY < DEPTH)
    else $fatal(1, "training_ref: DEPTH must be a power of two above DELAY");

endmodule
