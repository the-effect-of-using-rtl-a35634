// viterbi_decoder: hard-decision Viterbi decoder for the K = 3, rate-1/2 code.
//
// The trellis has four states {s1, s2} (s1 the newest information bit). For
// every received coded pair the add-compare-select step adds the Hamming
// distance between the pair and each branch's expected pair (generators 7
// and 6 octal, as in conv_encoder) to the predecessor's path metric and keeps
// the smaller sum; ties go to the predecessor with s2 = 0. Survivor paths are
// kept by register exchange: each state owns a TB-bit register holding its
// most recent TB decisions, and the survivor of the winning predecessor,
// shifted by the new decision, replaces it. After each pair the oldest
// decision of the state with the smallest metric is output. Path metrics are
// renormalised by subtracting the smallest one, so they stay within 0..4*TB.
// The decoder assumes the encoder starts in state 0.
// Interface: in_valid/in_pair (bit 0 = G0 output) in; out_valid/out_bit one
// cycle after the pair that completes a traceback window. The n-th output bit
// (counting from 0) is the n-th encoded information bit, so the latency is TB
// coded pairs. One pair per cycle is accepted.
// Hard decisions, the Hamming metric, the code and the traceback depth of
// 5*K = 15 follow the modem description; register exchange, the tie rule and
// the metric width are this design's choices.
module viterbi_decoder
  import modem_pkg::*;
#(
  parameter int unsigned TB = CC_TB
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pair_t in_pair,
  output logic  out_valid,
  output logic  out_bit
);

  localparam int PM_W = $clog2(4 * TB + 8) + 1;
  typedef logic [PM_W-1:0] pm_t;

  pm_t          pm [4];
  logic [TB-1:0] surv [4];
  logic [$clog2(TB+1)-1:0] seen;     // pairs received, saturating at TB

  pm_t           pm_new [4];
  pm_t           pm_norm [4];
  logic [TB-1:0] surv_new [4];
  logic [1:0]    best;

  // Expected coded pair when input u leaves state st.
  function automatic pair_t branch(input logic [1:0] st, input logic u);
    logic [2:0] r;
    r = {u, st};
    return {parity3(r, CC_G1), parity3(r, CC_G0)};
  endfunction

  function automatic pm_t hamming(input pair_t a, input pair_t b);
    pair_t d;
    d = a ^ b;
    return pm_t'(d[0]) + pm_t'(d[1]);
  endfunction

  always_comb begin
    for (int ns = 0; ns < 4; ns++) begin
      logic [1:0] p0, p1;
      logic       u;
      pm_t        m0, m1;
      u  = ns[1];
      p0 = {ns[0], 1'b0};
      p1 = {ns[0], 1'b1};
      m0 = pm[p0] + hamming(in_pair, branch(p0, u));
      m1 = pm[p1] + hamming(in_pair, branch(p1, u));
      if (m1 < m0) begin
        pm_new[ns]   = m1;
        surv_new[ns] = {surv[p1][TB-2:0], u};
      end else begin
        pm_new[ns]   = m0;
        surv_new[ns] = {surv[p0][TB-2:0], u};
      end
    end
    best = 2'd0;
    for (int s = 1; s < 4; s++) if (pm_new[s] < pm_new[best]) best = 2'(s);
    for (int s = 0; s < 4; s++) pm_norm[s] = pm_new[s] - pm_new[best];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pm[0] <= '0;
      for (int s = 1; s < 4; s++) pm[s] <= pm_t'(4 * TB);
      for (int s = 0; s < 4; s++) surv[s] <= '0;
      seen      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int s = 0; s < 4; s++) begin
          // Unreachable start states keep a large metric without overflowing.
          pm[s]   <= (pm_norm[s] > pm_t'(4 * TB)) ? pm_t'(4 * TB) : pm_norm[s];
          surv[s] <= surv_new[s];
        end
        out_bit <= surv_new[best][TB-1];
        if (seen != ($clog2(TB+1))'(TB)) seen <= seen + 1'b1;
        out_valid <= (seen >= ($clog2(TB+1))'(TB - 1));
      end
    end
  end

endmodule
