// duc: digital upconverter of the transmitter, from framed baseband symbols
// at 20 kbaud to a real IF signal at 80 MS/s for the DAC.
//
// Chain as in the modem description: upsampler M1 and CPSCIC filter
// (cpscic_interp, L = 8), CIC interpolator M2 (cic_interpolator, R = 500),
// then modulation to the IF by a DDS (nco, 30 MHz by default):
//   if = (I*cos - Q*sin) >>> 16
// The DAC word is forced to zero while tx_enable is low (the sensing timer
// silences the transmitter during a sensing window). The split of the
// 4000x interpolation into 8 x 500, the widths and the scaling are this
// design's choices.
//
// Interface: symbols in on a valid/ready stream (one is taken every 4000
// cycles; zero is sent when none is waiting); dac_out changes every cycle.
// Timing: fixed pipeline; a symbol reaches the DAC output roughly 25 cycles
// after the CIC takes it, spread by the filters' impulse responses.
module duc
  import sdr_pkg::*;
#(
  parameter int unsigned PSF_TAPS = 80,
  parameter int unsigned M1       = 8,
  parameter int unsigned M2       = 500,
  parameter int unsigned CIC_N    = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        tx_enable,
  input  logic [31:0]                 tuning_word,
  input  logic                        coef_we,
  input  logic [$clog2(PSF_TAPS)-1:0] coef_addr,
  input  logic signed [COEF_W-1:0]    coef_data,
  input  logic                        sym_valid,
  output logic                        sym_ready,
  input  logic signed [15:0]          sym_i,
  input  logic signed [15:0]          sym_q,
  output logic signed [15:0]          dac_out
);

  logic               psf_valid, psf_ready, cic_ready_q;
  logic signed [15:0] psf_i, psf_q, up_i, up_q, lo_cos, lo_sin;
  logic signed [32:0] mix;

  cpscic_interp #(.TAPS(PSF_TAPS), .L(M1), .DW(16)) u_psf (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .in_valid(sym_valid), .in_ready(sym_ready), .in_i(sym_i), .in_q(sym_q),
    .out_valid(psf_valid), .out_ready(psf_ready), .out_i(psf_i), .out_q(psf_q));

  cic_interpolator #(.N(CIC_N), .R(M2), .IW(16), .OW(16)) u_cic_i (
    .clk, .rst_n, .in_valid(psf_valid), .in_ready(psf_ready), .in(psf_i),
    .out(up_i));

  cic_interpolator #(.N(CIC_N), .R(M2), .IW(16), .OW(16)) u_cic_q (
    .clk, .rst_n, .in_valid(psf_valid), .in_ready(cic_ready_q), .in(psf_q),
    .out(up_q));

  nco u_lo (.clk, .rst_n, .en(1'b1), .tuning_word, .cos_out(lo_cos),
            .sin_out(lo_sin));

  assign mix = 33'(up_i * lo_cos) - 33'(up_q * lo_sin);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         dac_out <= '0;
    else if (tx_enable) dac_out <= 16'(mix >>> 16);
    else                dac_out <= '0;
  end

  // both CIC rails take their inputs in the same cycle
  a_rails: assert property (@(posedge clk) disable iff (!rst_n)
                            psf_ready == cic_ready_q);

endmodule
