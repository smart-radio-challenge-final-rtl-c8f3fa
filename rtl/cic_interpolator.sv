// cic_interpolator: N-stage cascaded-integrator-comb interpolator by R, the
// "CIC & M2 up" stage of the digital upconverter.
//
// The modem upconverts with a CIC after its combined pulse-shaping/CIC-
// compensation filter (CPSCIC); the order, the ratio and the widths are not
// given. This design uses N = 4 and R = 500 (160 kS/s to 80 MS/s, so that
// 20 kbaud x 8 (CPSCIC) x 500 = 80 MHz). Hogenauer structure: N combs at the
// low rate, zero-stuffing by R, N integrators at the clock rate, all in
// W = IW + N*ceil(log2 R) bits of wrap-around two's complement. The DC gain
// R^(N-1) is removed by an arithmetic right shift of (N-1)*ceil(log2 R).
//
// Interface: one input sample is taken every R clocks, in the cycle where
// in_ready is high (a missing sample, in_valid low, counts as zero); one
// output sample per clock on `out`.
// Timing: the combs are pipelined (one low-rate sample per stage), so an
// accepted input first affects `out` (N-1)*R + N + 1 cycles later.
module cic_interpolator #(
  parameter int unsigned N  = 4,
  parameter int unsigned R  = 500,
  parameter int unsigned IW = 16,
  parameter int unsigned OW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [IW-1:0] in,
  output logic signed [OW-1:0] out
);

  localparam int unsigned LR    = $clog2(R);
  localparam int unsigned W     = IW + N * LR;
  localparam int unsigned SHIFT = (N - 1) * LR;
  localparam int unsigned CW    = $clog2(R);

  logic [CW-1:0]       cnt;
  logic signed [W-1:0] comb_d [N];   // delayed comb inputs
  logic signed [W-1:0] comb_o [N];   // registered comb outputs
  logic signed [W-1:0] integ  [N];
  logic signed [W-1:0] stuffed;
  logic                take, take_q;
  logic signed [W-1:0] cin;

  assign in_ready = (cnt == '0);
  assign take     = in_ready;
  assign cin      = in_valid ? W'(in) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      take_q  <= 1'b0;
      stuffed <= '0;
      for (int i = 0; i < N; i++) begin
        comb_d[i] <= '0;
        comb_o[i] <= '0;
        integ[i]  <= '0;
      end
    end else begin
      cnt    <= (cnt == CW'(R - 1)) ? '0 : cnt + 1'b1;
      take_q <= take;
      // comb section, low rate (one step per accepted input)
      if (take) begin
        comb_o[0] <= cin - comb_d[0];
        comb_d[0] <= cin;
        for (int i = 1; i < N; i++) begin
          comb_o[i] <= comb_o[i-1] - comb_d[i];
          comb_d[i] <= comb_o[i-1];
        end
      end
      // zero stuffing: the comb result enters the integrators once
      stuffed <= take_q ? comb_o[N-1] : '0;
      // integrator section, clock rate
      integ[0] <= integ[0] + stuffed;
      for (int i = 1; i < N; i++) integ[i] <= integ[i] + integ[i-1];
    end
  end

  assign out = OW'(integ[N-1] >>> SHIFT);

endmodule
