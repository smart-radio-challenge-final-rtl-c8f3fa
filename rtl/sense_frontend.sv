// sense_frontend: FPGA part of the spectrum-sensing path. While the sensing
// timer holds the window open it demodulates the ADC stream from the IF to
// complex baseband with its own DDS and lowpass-decimates it by 16 to
// 5 MS/s (polyphase_decimator); the result goes to the DSP, which runs the
// filterbank and compiles the channel state information.
//
// Mixing: I = (adc * cos) >>> 13, Q = -(adc * sin) >>> 13 (this design's
// scaling). The decimator's commutator is restarted when the window opens
// (sense_start), so every window yields whole output blocks; outputs are
// passed on only inside the window.
//
// Interface: adc_in every cycle; s_valid pulses with each 5 MS/s sample.
// Timing: first output M + 2 cycles after the window opens, then one every
// M cycles.
module sense_frontend
  import sdr_pkg::*;
#(
  parameter int unsigned M    = 16,
  parameter int unsigned TAPS = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [31:0]              tuning_word,
  input  logic                     sense_active,
  input  logic                     sense_start,
  input  logic                     coef_we,
  input  logic [$clog2(TAPS)-1:0]  coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic signed [13:0]       adc_in,
  output logic                     s_valid,
  output logic signed [15:0]       s_i,
  output logic signed [15:0]       s_q
);

  logic signed [15:0] lo_cos, lo_sin, mix_i, mix_q;
  logic signed [29:0] p_i, p_q;
  logic               act_q, start_q, dec_valid;

  nco u_lo (.clk, .rst_n, .en(1'b1), .tuning_word, .cos_out(lo_cos),
            .sin_out(lo_sin));

  assign p_i = 30'(adc_in * lo_cos);
  assign p_q = 30'(adc_in * lo_sin);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mix_i   <= '0;
      mix_q   <= '0;
      act_q   <= 1'b0;
      start_q <= 1'b0;
    end else begin
      mix_i   <= 16'(p_i >>> 13);
      mix_q   <= 16'(-(p_q >>> 13));
      act_q   <= sense_active;
      start_q <= sense_start;
    end
  end

  polyphase_decimator #(.M(M), .TAPS(TAPS), .DW(16)) u_dec (
    .clk, .rst_n, .restart(start_q), .coef_we, .coef_addr, .coef_data,
    .in_valid(act_q), .in_i(mix_i), .in_q(mix_q),
    .out_valid(dec_valid), .out_i(s_i), .out_q(s_q));

  assign s_valid = dec_valid;

endmodule
