// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/2, K=7
// convolutional code (generators x^6+x^5+x^4+x^3+1 and x^6+x^4+x^3+x+1).
//
// The modem uses a Viterbi decoder on the FPGA for the data service; its
// insides are this design's own: 64 states, Hamming branch metrics,
// add-compare-select for every state in one cycle, and register-exchange
// survivor memory of TB_DEPTH bits per state. The decoded bit is the oldest
// bit of the survivor of the state with the smallest path metric. Metrics
// are renormalised each step by subtracting that smallest metric.
//
// Interface: coded bits arrive serially (c0 then c1 of each pair) on an
// in_valid/in_ready stream; decoded bits leave on out_valid/out_ready.
// `clear` restarts the trellis in state 0 (the encoder starts there too).
// Timing: the decoder only emits once TB_DEPTH pairs have been seen, so the
// bit decided from pair n leaves after pair n + TB_DEPTH has arrived; the
// last TB_DEPTH bits of a stream are released by sending further pairs
// (e.g. the next block or zero padding). One pair is processed per accepted
// second bit, i.e. at most one information bit per two cycles.
module viterbi_decoder
  import sdr_pkg::*;
#(
  parameter int unsigned TB_DEPTH = 42,  // survivor length, 6 x K
  parameter int unsigned MW       = 8    // path-metric width
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit
);

  localparam int unsigned NS = 64;

  logic [MW-1:0]       pm     [NS];
  logic [TB_DEPTH-1:0] surv   [NS];
  logic [MW-1:0]       pm_nx  [NS];
  logic [TB_DEPTH-1:0] surv_nx[NS];
  logic                have_c0;
  logic                c0;
  logic [$clog2(TB_DEPTH+1)-1:0] fill;
  logic [MW-1:0]       min_pm;
  logic [5:0]          best;

  assign in_ready = !out_valid || out_ready;

  // branch metric of the transition that enters `ns` from predecessor
  // {x, ns[5:1]}: the 7-bit encoder window is {x, ns}
  function automatic logic [1:0] bm(input logic [6:0] win, input logic r0,
                                    input logic r1);
    logic e0, e1;
    e0 = (^(win & CONV_G0)) ^ r0;
    e1 = (^(win & CONV_G1)) ^ r1;
    return {1'b0, e0} + {1'b0, e1};
  endfunction

  // add-compare-select
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      logic [5:0]    p0, p1;
      logic [MW-1:0] m0, m1;
      p0 = {1'b0, 5'(s >> 1)};
      p1 = {1'b1, 5'(s >> 1)};
      m0 = pm[p0] + MW'(bm({1'b0, 6'(s)}, c0, in_bit));
      m1 = pm[p1] + MW'(bm({1'b1, 6'(s)}, c0, in_bit));
      if (m1 < m0) begin
        pm_nx[s]   = m1;
        surv_nx[s] = {surv[p1][TB_DEPTH-2:0], 1'(s & 1)};
      end else begin
        pm_nx[s]   = m0;
        surv_nx[s] = {surv[p0][TB_DEPTH-2:0], 1'(s & 1)};
      end
    end
  end

  // smallest current metric and its state
  always_comb begin
    min_pm = pm[0];
    best   = '0;
    for (int s = 1; s < NS; s++) begin
      if (pm[s] < min_pm) begin
        min_pm = pm[s];
        best   = 6'(s);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        pm[s]   <= (s == 0) ? '0 : MW'(16);
        surv[s] <= '0;
      end
      have_c0   <= 1'b0;
      c0        <= 1'b0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else if (clear) begin
      for (int s = 0; s < NS; s++) begin
        pm[s]   <= (s == 0) ? '0 : MW'(16);
        surv[s] <= '0;
      end
      have_c0   <= 1'b0;
      fill      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (!have_c0) begin
          c0      <= in_bit;
          have_c0 <= 1'b1;
        end else begin
          have_c0 <= 1'b0;
          for (int s = 0; s < NS; s++) begin
            pm[s]   <= pm_nx[s] - min_pm;
            surv[s] <= surv_nx[s];
          end
          if (fill == ($clog2(TB_DEPTH+1))'(TB_DEPTH)) begin
            out_valid <= 1'b1;
            out_bit   <= surv[best][TB_DEPTH-1];
          end else begin
            fill <= fill + 1'b1;
          end
        end
      end
    end
  end

endmodule
