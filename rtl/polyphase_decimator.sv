// polyphase_decimator: the lowpass polyphase decimator of the sensing path.
// It keeps the band of interest of the IF-demodulated ADC stream and brings
// the sample rate down by M = 16, from 80 MS/s to 5 MS/s (both rates from the
// modem description).
//
// The filter length and coefficients are not given. This design uses
// TAPS = 64 (four per branch) held in writable registers; the reset value
// is a 16-sample moving average (h[k] = 1/16 for k < 16, 0 otherwise),
// which has nulls at every multiple of the 5 MHz output rate.
// Polyphase form: output m is y[m] = sum_k h[k] x[M*m + M-1 - k]. Input
// sample r of block m (r = 0..M-1) belongs to branch r, whose delay line
// holds x[M*q + r] for q = m, m-1, ..; when it arrives the branch's TAPS/M
// products with h[M-1-r + M*j] are added to an accumulator (TAPS/M
// multipliers per rail), and after r = M-1 the sum leaves.
//
// Interface: complex input with in_valid (normally every clock); out_valid
// pulses once per M inputs. `restart` realigns the commutator: the input
// of the same cycle (or else the next one) is r = 0 (used when a sensing window opens).
// Timing: the output is registered one cycle after the block's last input.
// Output = sum >>> COEF_FRAC, saturated to DW bits.
module polyphase_decimator
  import sdr_pkg::*;
#(
  parameter int unsigned M    = 16,
  parameter int unsigned TAPS = 64,
  parameter int unsigned DW   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     restart,
  input  logic                     coef_we,
  input  logic [$clog2(TAPS)-1:0]  coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic                     in_valid,
  input  logic signed [DW-1:0]     in_i,
  input  logic signed [DW-1:0]     in_q,
  output logic                     out_valid,
  output logic signed [DW-1:0]     out_i,
  output logic signed [DW-1:0]     out_q
);

  localparam int unsigned NB = TAPS / M;   // taps per branch
  localparam int unsigned AW = DW + COEF_W + $clog2(TAPS) + 1;
  localparam int unsigned RW = $clog2(M);

  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [DW-1:0]     bi [M][NB];
  logic signed [DW-1:0]     bq [M][NB];
  logic [RW-1:0]            r;
  logic signed [AW-1:0]     acc_i, acc_q;
  logic signed [AW-1:0]     part_i, part_q;
  logic [RW-1:0]            rr;             // branch of the current sample
  logic signed [AW-1:0]     base_i, base_q; // accumulator it adds to

  assign rr     = restart ? '0 : r;
  assign base_i = restart ? '0 : acc_i;
  assign base_q = restart ? '0 : acc_q;

  function automatic logic signed [DW-1:0] sat(input logic signed [AW-1:0] a);
    logic signed [AW-1:0] s;
    s = a >>> COEF_FRAC;
    if (s > AW'((1 <<< (DW - 1)) - 1))  return {1'b0, {(DW-1){1'b1}}};
    if (s < -AW'(1 <<< (DW - 1)))       return {1'b1, {(DW-1){1'b0}}};
    return s[DW-1:0];
  endfunction

  // products of the branch that receives the current sample; tap j = 0 is
  // the new sample itself
  always_comb begin
    part_i = AW'(coef[int'(M) - 1 - int'(rr)] * in_i);
    part_q = AW'(coef[int'(M) - 1 - int'(rr)] * in_q);
    for (int j = 1; j < int'(NB); j++) begin
      part_i += AW'(coef[int'(M) - 1 - int'(rr) + int'(M) * j] * bi[rr][j-1]);
      part_q += AW'(coef[int'(M) - 1 - int'(rr) + int'(M) * j] * bq[rr][j-1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TAPS); k++)
        coef[k] <= (k < int'(M)) ? COEF_W'((1 << COEF_FRAC) / M) : '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(M); b++)
        for (int j = 0; j < int'(NB); j++) begin
          bi[b][j] <= '0;
          bq[b][j] <= '0;
        end
      r         <= '0;
      acc_i     <= '0;
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        bi[rr][0] <= in_i;
        bq[rr][0] <= in_q;
        for (int j = 1; j < int'(NB); j++) begin
          bi[rr][j] <= bi[rr][j-1];
          bq[rr][j] <= bq[rr][j-1];
        end
        if (rr == RW'(M - 1)) begin
          out_valid <= 1'b1;
          out_i     <= sat(base_i + part_i);
          out_q     <= sat(base_q + part_q);
          acc_i     <= '0;
          acc_q     <= '0;
        end else begin
          acc_i <= base_i + part_i;
          acc_q <= base_q + part_q;
        end
        r <= (rr == RW'(M - 1)) ? '0 : rr + 1'b1;
      end else if (restart) begin
        r     <= '0;
        acc_i <= '0;
        acc_q <= '0;
      end
    end
  end

endmodule
