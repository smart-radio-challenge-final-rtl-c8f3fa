// cic_decimator: N-stage cascaded-integrator-comb decimator by R, the
// "CIC & M2 down" stage of the digital downconverter.
//
// The modem downconverts with a CIC ahead of its CPSCIC filter; order, ratio
// and widths are not given. This design uses N = 4, R = 500 (80 MS/s to
// 160 kS/s), matching the upconverter. Hogenauer structure: N integrators
// at the input rate, keep every R-th value, N combs at the output rate, all
// in W = IW + N*ceil(log2 R) bits of wrap-around arithmetic. The DC gain R^N
// is removed by an arithmetic right shift of N*ceil(log2 R).
//
// Interface: in_valid marks input samples (normally every clock); out_valid
// pulses for one cycle with each decimated sample.
// Timing: an output appears N+1 cycles after every R-th input.
module cic_decimator #(
  parameter int unsigned N  = 4,
  parameter int unsigned R  = 500,
  parameter int unsigned IW = 16,
  parameter int unsigned OW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in,
  output logic                 out_valid,
  output logic signed [OW-1:0] out
);

  localparam int unsigned LR    = $clog2(R);
  localparam int unsigned W     = IW + N * LR;
  localparam int unsigned SHIFT = N * LR;
  localparam int unsigned CW    = $clog2(R);

  logic [CW-1:0]       cnt;
  logic signed [W-1:0] integ  [N];
  logic signed [W-1:0] comb_d [N];
  logic signed [W-1:0] comb_o [N];
  logic [N:0]          stage_v;   // valid travelling through the combs

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      stage_v <= '0;
      for (int i = 0; i < N; i++) begin
        integ[i]  <= '0;
        comb_d[i] <= '0;
        comb_o[i] <= '0;
      end
    end else begin
      stage_v <= {stage_v[N-1:0], 1'b0};
      if (in_valid) begin
        integ[0] <= integ[0] + W'(in);
        for (int i = 1; i < N; i++) integ[i] <= integ[i] + integ[i-1];
        cnt <= (cnt == CW'(R - 1)) ? '0 : cnt + 1'b1;
        if (cnt == CW'(R - 1)) stage_v[0] <= 1'b1;
      end
      // comb section: one stage per cycle after the sampling point
      if (stage_v[0]) begin
        comb_o[0] <= integ[N-1] - comb_d[0];
        comb_d[0] <= integ[N-1];
      end
      for (int i = 1; i < N; i++) begin
        if (stage_v[i]) begin
          comb_o[i] <= comb_o[i-1] - comb_d[i];
          comb_d[i] <= comb_o[i-1];
        end
      end
    end
  end

  assign out_valid = stage_v[N];
  assign out       = OW'(comb_o[N-1] >>> SHIFT);

endmodule
