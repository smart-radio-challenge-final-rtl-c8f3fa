// cpscic_interp: the combined pulse-shaping and CIC-compensation filter
// (CPSCIC) of the transmitter together with its upsampler M1.
//
// The modem uses an 80-tap FIR whose coefficients give the Nyquist-M
// property and pre-compensate the droop of the following CIC; the
// coefficients themselves are not printed, so they are held in writable
// registers (reset value: a triangular Nyquist-L kernel, see
// sdr_pkg::tri_coef). The upsampling factor L = 8 is this design's choice
// (20 kbaud x 8 = 160 kS/s into the CIC interpolator by 500).
// Polyphase form: output phase p (0..L-1) of input symbol n is
//   y = sum_{j=0}^{TAPS/L-1} h[j*L + p] * x[n - j]
// computed for I and Q with one multiplier each, one tap per cycle.
//
// Interface: complex symbols in on a valid/ready stream (a new symbol is
// taken at every phase 0; when none is offered a zero is shifted in, which
// is the idle level); complex samples out on a valid/ready stream;
// coefficient writes through coef_we/coef_addr/coef_data.
// Timing: TAPS/L + 1 cycles after a sample is taken the next one is valid.
// Output = accumulator >>> COEF_FRAC, saturated to 16 bits.
module cpscic_interp
  import sdr_pkg::*;
#(
  parameter int unsigned TAPS = 80,
  parameter int unsigned L    = 8,
  parameter int unsigned DW   = 16
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
  input  logic                     out_ready,
  output logic signed [DW-1:0]     out_i,
  output logic signed [DW-1:0]     out_q
);

  localparam int unsigned NJ = TAPS / L;         // taps per phase
  localparam int unsigned AW = DW + COEF_W + $clog2(NJ) + 1;
  localparam int unsigned PW = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned JW = $clog2(NJ + 1);
  localparam int unsigned TW = $clog2(TAPS);

  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [DW-1:0]     xi [NJ];
  logic signed [DW-1:0]     xq [NJ];
  logic [PW-1:0]            ph;
  logic [JW-1:0]            j;
  logic                     busy;
  logic signed [AW-1:0]     acc_i, acc_q;
  logic signed [COEF_W-1:0] hc;
  logic                     load;   // shift in the next symbol

  assign hc       = coef[TW'(j) * TW'(L) + TW'(ph)];
  assign load     = out_valid && out_ready && (ph == PW'(L - 1));
  assign in_ready = load;

  function automatic logic signed [DW-1:0] sat(input logic signed [AW-1:0] a);
    logic signed [AW-1:0] s;
    s = a >>> COEF_FRAC;
    if (s > AW'((1 <<< (DW - 1)) - 1))  return {1'b0, {(DW-1){1'b1}}};
    if (s < -AW'(1 <<< (DW - 1)))       return {1'b1, {(DW-1){1'b0}}};
    return s[DW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(TAPS); k++) coef[k] <= tri_coef(k, int'(L));
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NJ); k++) begin
        xi[k] <= '0;
        xq[k] <= '0;
      end
      ph        <= PW'(L - 1);
      j         <= '0;
      busy      <= 1'b0;
      acc_i     <= '0;
      acc_q     <= '0;
      out_valid <= 1'b1;     // a zero sample is ready right after reset
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      if (out_valid && out_ready) begin
        out_valid <= 1'b0;
        busy      <= 1'b1;
        j         <= '0;
        acc_i     <= '0;
        acc_q     <= '0;
        ph        <= (ph == PW'(L - 1)) ? '0 : ph + 1'b1;
        if (load) begin
          xi[0] <= in_valid ? in_i : '0;
          xq[0] <= in_valid ? in_q : '0;
          for (int k = 1; k < int'(NJ); k++) begin
            xi[k] <= xi[k-1];
            xq[k] <= xq[k-1];
          end
        end
      end else if (busy) begin
        if (j == JW'(NJ)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          out_i     <= sat(acc_i);
          out_q     <= sat(acc_q);
        end else begin
          acc_i <= acc_i + AW'(hc * xi[j]);
          acc_q <= acc_q + AW'(hc * xq[j]);
          j     <= j + 1'b1;
        end
      end
    end
  end

endmodule
