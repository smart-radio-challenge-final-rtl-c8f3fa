// cpscic_decim: the receiver's CPSCIC filter (matched to the transmitter's
// combined pulse-shaping / CIC-compensation filter) followed by the
// decimator M1, which leaves two samples per symbol (Ts/2 spacing) for the
// fractionally spaced equalizer.
//
// An 80-tap FIR as on the transmit side; the coefficients are not printed
// and are held in writable registers (reset value: sdr_pkg::tri_coef with
// L = 8). The decimation factor D = 4 follows from the rates chosen for
// this design: 160 kS/s out of the CIC decimator, 40 kS/s = 2 x 20 kbaud
// out. Every D-th input sample the filter output
//   y = sum_{k=0}^{TAPS-1} h[k] * x[n - k]
// is computed for I and Q with one multiplier each, one tap per cycle.
//
// Interface: complex samples in on a valid/ready stream (in_ready is low
// while a dot product is being formed); out_valid pulses with each output.
// Timing: the output appears TAPS + 1 cycles after its last input sample.
// Output = accumulator >>> OUT_SHIFT, saturated to DW bits; the default
// shift divides out the DC gain 8 of the reset kernel.
module cpscic_decim
  import sdr_pkg::*;
#(
  parameter int unsigned TAPS      = 80,
  parameter int unsigned D         = 4,
  parameter int unsigned DW        = 16,
  parameter int unsigned OUT_SHIFT = COEF_FRAC + 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  logic [$clog2(TAPS)-1:0]  coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DW-1:0]     in_i,
  input  logic signed [DW-1:0]     in_q,
  output logic                     out_valid,
  output logic signed [DW-1:0]     out_i,
  output logic signed [DW-1:0]     out_q
);

  localparam int unsigned AW = DW + COEF_W + $clog2(TAPS) + 1;
  localparam int unsigned KW = $clog2(TAPS + 1);
  localparam int unsigned DCW = (D > 1) ? $clog2(D) : 1;

  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [DW-1:0]     xi [TAPS];
  logic signed [DW-1:0]     xq [TAPS];
  logic [DCW-1:0]           dcnt;
  logic [KW-1:0]            k;
  logic                     busy;
  logic signed [AW-1:0]     acc_i, acc_q;

  assign in_ready = !busy;

  function automatic logic signed [DW-1:0] sat(input logic signed [AW-1:0] a);
    logic signed [AW-1:0] s;
    s = a >>> OUT_SHIFT;
    if (s > AW'((1 <<< (DW - 1)) - 1))  return {1'b0, {(DW-1){1'b1}}};
    if (s < -AW'(1 <<< (DW - 1)))       return {1'b1, {(DW-1){1'b0}}};
    return s[DW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(TAPS); i++) coef[i] <= tri_coef(i, 8);
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(TAPS); i++) begin
        xi[i] <= '0;
        xq[i] <= '0;
      end
      dcnt      <= '0;
      k         <= '0;
      busy      <= 1'b0;
      acc_i     <= '0;
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        xi[0] <= in_i;
        xq[0] <= in_q;
        for (int i = 1; i < int'(TAPS); i++) begin
          xi[i] <= xi[i-1];
          xq[i] <= xq[i-1];
        end
        if (dcnt == DCW'(D - 1)) begin
          dcnt  <= '0;
          busy  <= 1'b1;
          k     <= '0;
          acc_i <= '0;
          acc_q <= '0;
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end else if (busy) begin
        if (k == KW'(TAPS)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          out_i     <= sat(acc_i);
          out_q     <= sat(acc_q);
        end else begin
          acc_i <= acc_i + AW'(coef[k] * xi[k]);
          acc_q <= acc_q + AW'(coef[k] * xq[k]);
          k     <= k + 1'b1;
        end
      end
    end
  end

endmodule
