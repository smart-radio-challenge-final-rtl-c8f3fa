// nco: numerically controlled oscillator, the direct digital synthesizer
// (DDS) used to move signals between baseband and the IF.
//
// A 32-bit phase accumulator advances by `tuning_word` every enabled cycle
// (f = tuning_word / 2^32 * f_clk; 30 MHz at 80 MHz is 32'h6000_0000). The
// phase is turned into cos and sin by a pipelined CORDIC in rotation mode
// instead of a lookup table: the phase is folded into [-pi/2, pi/2) (the
// outputs are negated when folding by pi), then ITER micro-rotations by
// atan(2^-i) drive the residual angle to zero. The modem only asks for a
// DDS; the CORDIC, the 16-bit outputs and the pipeline are this design's
// choices.
//
// Interface: `en` advances the oscillator and the pipeline by one step.
// Timing: cos/sin correspond to the phase that was current ITER+1 enabled
// cycles earlier; amplitude is about 32767 (full scale 16-bit signed), peak
// error within 8 LSB.
module nco #(
  parameter int unsigned ITER = 16,   // CORDIC micro-rotations (max 16)
  parameter int unsigned OW   = 16    // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [31:0]          tuning_word,
  output logic signed [OW-1:0] cos_out,
  output logic signed [OW-1:0] sin_out
);

  localparam int IW = OW + 4;  // internal width, headroom for CORDIC gain

  // atan(2^-i) in units of 2*pi / 2^32
  localparam logic [31:0] ATAN [16] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861};

  // start vector length: (2^(OW-1) - 1) / CORDIC gain, gain = 1.64676
  localparam logic signed [IW-1:0] X0 =
      IW'(((longint'(1) << (OW - 1)) - 1) * 60725 / 100000);

  logic [31:0]              phase;
  logic signed [IW-1:0]     xs [ITER+1];
  logic signed [IW-1:0]     ys [ITER+1];
  logic signed [31:0]       zs [ITER+1];
  logic                     ng [ITER+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      for (int i = 0; i <= ITER; i++) begin
        xs[i] <= '0;
        ys[i] <= '0;
        zs[i] <= '0;
        ng[i] <= 1'b0;
      end
      cos_out <= '0;
      sin_out <= '0;
    end else if (en) begin
      phase <= phase + tuning_word;
      // fold: quadrants 1 and 2 are rotated by pi and the result negated
      xs[0] <= X0;
      ys[0] <= '0;
      if (phase[31] ^ phase[30]) begin
        zs[0] <= signed'(phase - 32'h8000_0000);
        ng[0] <= 1'b1;
      end else begin
        zs[0] <= signed'(phase);
        ng[0] <= 1'b0;
      end
      for (int i = 0; i < ITER; i++) begin
        if (zs[i] >= 0) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - signed'(ATAN[i]);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + signed'(ATAN[i]);
        end
        ng[i+1] <= ng[i];
      end
      cos_out <= ng[ITER] ? OW'(-xs[ITER]) : OW'(xs[ITER]);
      sin_out <= ng[ITER] ? OW'(-ys[ITER]) : OW'(ys[ITER]);
    end
  end

endmodule
