// ddc: digital downconverter of the receiver, from the real 14-bit ADC
// stream at 80 MS/s to complex baseband at two samples per symbol
// (40 kS/s), the input of the DSP's synchronisation and equalizer.
//
// Chain as in the modem description: demodulation by a DDS at the IF
// (nco), CIC decimator M2 (cic_decimator, R = 500), CPSCIC filter and
// decimator M1 (cpscic_decim, D = 4):
//   I = (adc * cos) >>> 13,  Q = -(adc * sin) >>> 13
// The 2 x IF mixing product falls on a null of the CIC. Ratios, widths and
// scaling are this design's choices.
//
// Interface: adc_in every cycle; bb_valid pulses with each baseband sample.
// Timing: one output per 2000 input samples.
module ddc
  import sdr_pkg::*;
#(
  parameter int unsigned PSF_TAPS = 80,
  parameter int unsigned M1       = 4,
  parameter int unsigned M2       = 500,
  parameter int unsigned CIC_N    = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [31:0]                 tuning_word,
  input  logic                        coef_we,
  input  logic [$clog2(PSF_TAPS)-1:0] coef_addr,
  input  logic signed [COEF_W-1:0]    coef_data,
  input  logic signed [13:0]          adc_in,
  output logic                        bb_valid,
  output logic signed [15:0]          bb_i,
  output logic signed [15:0]          bb_q
);

  logic signed [15:0] lo_cos, lo_sin, mix_i, mix_q, cic_i, cic_q;
  logic signed [29:0] p_i, p_q;
  logic               cic_v, cic_v_q, psf_in_ready;

  nco u_lo (.clk, .rst_n, .en(1'b1), .tuning_word, .cos_out(lo_cos),
            .sin_out(lo_sin));

  assign p_i = 30'(adc_in * lo_cos);
  assign p_q = 30'(adc_in * lo_sin);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mix_i <= '0;
      mix_q <= '0;
    end else begin
      mix_i <= 16'(p_i >>> 13);
      mix_q <= 16'(-(p_q >>> 13));
    end
  end

  cic_decimator #(.N(CIC_N), .R(M2), .IW(16), .OW(16)) u_cic_i (
    .clk, .rst_n, .in_valid(1'b1), .in(mix_i), .out_valid(cic_v), .out(cic_i));

  cic_decimator #(.N(CIC_N), .R(M2), .IW(16), .OW(16)) u_cic_q (
    .clk, .rst_n, .in_valid(1'b1), .in(mix_q), .out_valid(cic_v_q), .out(cic_q));

  cpscic_decim #(.TAPS(PSF_TAPS), .D(M1), .DW(16)) u_psf (
    .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
    .in_valid(cic_v), .in_ready(psf_in_ready), .in_i(cic_i), .in_q(cic_q),
    .out_valid(bb_valid), .out_i(bb_i), .out_q(bb_q));

  // the CIC output rate leaves the filter time to finish each dot product
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 cic_v |-> psf_in_ready);
  a_rails: assert property (@(posedge clk) disable iff (!rst_n)
                            cic_v == cic_v_q);

endmodule
