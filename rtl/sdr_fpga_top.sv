// sdr_fpga_top: FPGA side of a cognitive-radio modem for first responders.
//
// The modem splits its work between a DSP and an FPGA that talk over a
// 16-bit video-port link (vpss_port) and eight shared 32-bit custom
// registers (custom_regs). The DSP writes a command number into R_f and
// streams data over the link; the FPGA performs the service and streams
// results back, tagged with R_d:
//   R_f = 0      voice bits -> RS(63,51) encoder            -> back, R_d = 0
//   R_f = 1      data bits  -> K=7 conv. encoder + 12x16 interleaver
//                                                            -> back, R_d = 0
//   R_f = 2      framed symbols -> digital upconverter -> DAC
//   R_f = 2 (rx) demapped voice symbols -> RS decoder       -> back, R_d = 2
//   R_f = 3 (rx) demapped data bits -> deinterleaver + Viterbi
//                                                            -> back, R_d = 2
// Independently of commands, the ADC stream is downconverted to two
// samples per symbol and sent with R_d = 1, and every 100 ms a sensing
// timer opens a short window in which the transmitter is silenced and the
// sensing front end sends 5 MS/s samples with R_d = 3.
// The services, R_f/R_d numbers, rates and the DSP/FPGA split follow the
// modem description; link word formats, the receive flag in R_f (bit 4),
// FIFO depths and the arbitration order are this design's choices.
//
// Link word formats: RS paths one 6-bit symbol in bits [5:0]; encoder input
// 16 information bits, LSB first; encoder output and Viterbi input 32 coded
// bits; Viterbi output 16 bits; upconverter input and baseband/sensing
// output {Q[15:0], I[15:0]}.
// Filter coefficients are loaded through coef_we/coef_sel/coef_addr/
// coef_data (coef_sel 0: transmit CPSCIC, 1: receive CPSCIC, 2: sensing
// lowpass).
module sdr_fpga_top
  import sdr_pkg::*;
#(
  parameter int unsigned SENSE_PERIOD = SENSE_PERIOD_CYC,  // 100 ms at 80 MHz
  parameter int unsigned SENSE_ACTIVE = 320,        // 4 us at 80 MHz
  parameter int unsigned IL_ROWS      = 12,
  parameter int unsigned IL_COLS      = 16,
  parameter int unsigned VIT_DEPTH    = 42,
  parameter int unsigned PSF_TAPS     = 80,
  parameter int unsigned TX_M1        = 8,
  parameter int unsigned RX_M1        = 4,
  parameter int unsigned CIC_M2       = 500,
  parameter int unsigned CIC_N        = 4,
  parameter int unsigned SENSE_M3     = 16,
  parameter int unsigned SENSE_TAPS   = 64
) (
  input  logic               clk,          // 80 MHz sample clock
  input  logic               rst_n,
  // custom registers, DSP side
  input  logic               creg_we,
  input  logic [2:0]         creg_addr,
  input  logic [31:0]        creg_wdata,
  output logic [31:0]        creg_rdata,
  // VPSS link: DSP -> FPGA
  input  logic               be_valid,
  output logic               be_ready,
  input  logic [15:0]        be_data,
  // VPSS link: FPGA -> DSP
  output logic               fe_valid,
  input  logic               fe_ready,
  output logic [15:0]        fe_data,
  output logic [1:0]         fe_tag,
  // filter coefficient loading
  input  logic               coef_we,
  input  logic [1:0]         coef_sel,
  input  logic [6:0]         coef_addr,
  input  logic signed [15:0] coef_data,
  // data converters
  input  logic signed [13:0] adc_data,
  output logic signed [15:0] dac_data,
  // status
  output logic               tx_enable,
  output logic               sense_active,
  output logic               rs_dec_done,
  output logic               rs_dec_fail,
  output logic [3:0]         rs_dec_corrected,
  output logic               cmd_dropped
);

  // ------------------------------------------------------ custom registers
  logic [31:0] regs [NUM_CREGS];
  logic        rf_changed;
  logic        fe_word_taken;
  logic [1:0]  link_tag;

  custom_regs u_regs (
    .clk, .rst_n, .dsp_we(creg_we), .dsp_addr(creg_addr),
    .dsp_wdata(creg_wdata), .dsp_rdata(creg_rdata),
    .rd_we(fe_word_taken), .rd_wdata({30'd0, link_tag}),
    .regs, .rf_changed);

  cmd_e cmd;
  assign cmd = rf_to_cmd(regs[CREG_RF]);

  // ------------------------------------------------------------ VPSS link
  logic        win_valid, win_ready;
  logic [31:0] win_data;
  logic        wout_valid, wout_ready;
  logic [31:0] wout_data;

  vpss_port u_vpss (
    .clk, .rst_n, .clear(1'b0),
    .be_valid, .be_ready, .be_data,
    .word_in_valid(win_valid), .word_in_ready(win_ready), .word_in_data(win_data),
    .word_out_valid(wout_valid), .word_out_ready(wout_ready),
    .word_out_data(wout_data), .word_out_tag(link_tag),
    .fe_valid, .fe_ready, .fe_data, .fe_tag);

  assign fe_word_taken = wout_valid && wout_ready;

  // -------------------------------------------------------- command router
  logic [4:0]  rt_valid, rt_ready;
  logic [31:0] rt_data;

  cmd_router u_router (
    .cmd, .in_valid(win_valid), .in_ready(win_ready), .in_data(win_data),
    .out_valid(rt_valid), .out_ready(rt_ready), .out_data(rt_data),
    .dropped(cmd_dropped));

  // a change of service starts the coding chains afresh
  logic chain_clear;
  assign chain_clear = rf_changed;

  // -------------------------------------------------- R_f = 0: RS encoder
  logic       rse_valid, rse_ready;
  gf_t        rse_sym;

  rs_encoder u_rs_enc (
    .clk, .rst_n, .clear(chain_clear),
    .in_valid(rt_valid[0]), .in_ready(rt_ready[0]), .in_sym(rt_data[5:0]),
    .out_valid(rse_valid), .out_ready(rse_ready), .out_sym(rse_sym));

  // ------------------------------ R_f = 1: conv. encoder and interleaver
  logic        ce_in_valid, ce_in_ready, ce_in_bit;
  logic        ce_valid, ce_ready, ce_bit;
  logic        il_valid, il_ready, il_bit;
  logic        cw_valid, cw_ready;
  logic [31:0] cw_data;

  word_serializer #(.NBITS(16)) u_enc_ser (
    .clk, .rst_n, .clear(chain_clear),
    .in_valid(rt_valid[1]), .in_ready(rt_ready[1]), .in_data(rt_data),
    .out_valid(ce_in_valid), .out_ready(ce_in_ready), .out_bit(ce_in_bit));

  conv_encoder u_conv (
    .clk, .rst_n, .clear(chain_clear),
    .in_valid(ce_in_valid), .in_ready(ce_in_ready), .in_bit(ce_in_bit),
    .out_valid(ce_valid), .out_ready(ce_ready), .out_bit(ce_bit));

  block_interleaver #(.ROWS(IL_ROWS), .COLS(IL_COLS)) u_il (
    .clk, .rst_n, .clear(chain_clear),
    .in_valid(ce_valid), .in_ready(ce_ready), .in_bit(ce_bit),
    .out_valid(il_valid), .out_ready(il_ready), .out_bit(il_bit));

  bit_packer #(.NBITS(32)) u_enc_pack (
    .clk, .rst_n, .clear(chain_clear),
    .in_valid(il_valid), .in_ready(il_ready), .in_bit(il_bit),
    .out_valid(cw_valid), .out_ready(cw_ready), .out_data(cw_data));

  // --------------------------------------------- R_f = 2: upconverter
  logic        sf_valid, sf_ready;
  logic [31:0] sf_data;

  stream_fifo #(.W(32), .DEPTH(16)) u_sym_fifo (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(rt_valid[2]), .in_ready(rt_ready[2]), .in_data(rt_data),
    .out_valid(sf_valid), .out_ready(sf_ready), .out_data(sf_data));

  logic sense_start;

  duc #(.PSF_TAPS(PSF_TAPS), .M1(TX_M1), .M2(CIC_M2), .CIC_N(CIC_N)) u_duc (
    .clk, .rst_n, .tx_enable, .tuning_word(regs[CREG_DUC_TW]),
    .coef_we(coef_we && coef_sel == 2'd0),
    .coef_addr(coef_addr[$clog2(PSF_TAPS)-1:0]), .coef_data,
    .sym_valid(sf_valid), .sym_ready(sf_ready),
    .sym_i(sf_data[15:0]), .sym_q(sf_data[31:16]), .dac_out(dac_data));

  // ------------------------------------------- R_f = 2 (rx): RS decoder
  logic rsd_valid, rsd_ready;
  gf_t  rsd_sym;

  rs_decoder u_rs_dec (
    .clk, .rst_n,
    .in_valid(rt_valid[3]), .in_ready(rt_ready[3]), .in_sym(rt_data[5:0]),
    .out_valid(rsd_valid), .out_ready(rsd_ready), .out_sym(rsd_sym),
    .done(rs_dec_done), .fail(rs_dec_fail), .n_corrected(rs_dec_corrected));

  // --------------------------- R_f = 3 (rx): deinterleaver and Viterbi
  logic        vd_in_valid, vd_in_ready, vd_in_bit;
  logic        di_valid, di_ready, di_bit;
  logic        vt_valid, vt_ready, vt_bit;
  logic        dw_valid, dw_ready;
  logic [31:0] dw_data;

  word_serializer #(.NBITS(32)) u_dec_ser (
    .clk, .rst_n, .clear(chain_clear),
    .in_valid(rt_valid[4]), .in_ready(rt_ready[4]), .in_data(rt_data),
    .out_valid(vd_in_valid), .out_ready(vd_in_ready), .out_bit(vd_in_bit));

  block_interleaver #(.ROWS(IL_COLS), .COLS(IL_ROWS)) u_dil (
    .clk, .rst_n, .clear(chain_clear),
    .in_valid(vd_in_valid), .in_ready(vd_in_ready), .in_bit(vd_in_bit),
    .out_valid(di_valid), .out_ready(di_ready), .out_bit(di_bit));

  viterbi_decoder #(.TB_DEPTH(VIT_DEPTH)) u_vit (
    .clk, .rst_n, .clear(chain_clear),
    .in_valid(di_valid), .in_ready(di_ready), .in_bit(di_bit),
    .out_valid(vt_valid), .out_ready(vt_ready), .out_bit(vt_bit));

  bit_packer #(.NBITS(16)) u_dec_pack (
    .clk, .rst_n, .clear(chain_clear),
    .in_valid(vt_valid), .in_ready(vt_ready), .in_bit(vt_bit),
    .out_valid(dw_valid), .out_ready(dw_ready), .out_data(dw_data));

  // --------------------------------------------------- receive baseband
  logic               bb_valid;
  logic signed [15:0] bb_i, bb_q;
  logic               bbf_valid, bbf_ready, bbf_in_ready;
  logic [31:0]        bbf_data;

  ddc #(.PSF_TAPS(PSF_TAPS), .M1(RX_M1), .M2(CIC_M2), .CIC_N(CIC_N)) u_ddc (
    .clk, .rst_n, .tuning_word(regs[CREG_DDC_TW]),
    .coef_we(coef_we && coef_sel == 2'd1),
    .coef_addr(coef_addr[$clog2(PSF_TAPS)-1:0]), .coef_data,
    .adc_in(adc_data), .bb_valid, .bb_i, .bb_q);

  stream_fifo #(.W(32), .DEPTH(16)) u_bb_fifo (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(bb_valid), .in_ready(bbf_in_ready), .in_data({bb_q, bb_i}),
    .out_valid(bbf_valid), .out_ready(bbf_ready), .out_data(bbf_data));

  // ---------------------------------------------------------- sensing
  logic               s_valid;
  logic signed [15:0] s_i, s_q;
  logic               sfq_valid, sfq_ready, sfq_in_ready;
  logic [31:0]        sfq_data;

  sensing_timer #(.PERIOD(SENSE_PERIOD), .ACTIVE(SENSE_ACTIVE)) u_timer (
    .clk, .rst_n, .enable(1'b1), .sense_active, .sense_start, .tx_enable);

  sense_frontend #(.M(SENSE_M3), .TAPS(SENSE_TAPS)) u_sense (
    .clk, .rst_n, .tuning_word(regs[CREG_SENSE_TW]), .sense_active,
    .sense_start, .coef_we(coef_we && coef_sel == 2'd2),
    .coef_addr(coef_addr[$clog2(SENSE_TAPS)-1:0]), .coef_data,
    .adc_in(adc_data), .s_valid, .s_i, .s_q);

  stream_fifo #(.W(32), .DEPTH(32)) u_sense_fifo (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(s_valid), .in_ready(sfq_in_ready), .in_data({s_q, s_i}),
    .out_valid(sfq_valid), .out_ready(sfq_ready), .out_data(sfq_data));

  // ------------------------------------------------- return-link arbiter
  logic [5:0]  ar_valid, ar_ready;
  logic [31:0] ar_data [6];

  assign ar_valid   = {rse_valid, cw_valid, rsd_valid, dw_valid, bbf_valid, sfq_valid};
  assign ar_data[0] = sfq_data;
  assign ar_data[1] = bbf_data;
  assign ar_data[2] = dw_data;
  assign ar_data[3] = {26'd0, rsd_sym};
  assign ar_data[4] = cw_data;
  assign ar_data[5] = {26'd0, rse_sym};
  assign {rse_ready, cw_ready, rsd_ready, dw_ready, bbf_ready, sfq_ready} = ar_ready;

  rd_arbiter #(.NSRC(6),
               .TAGS('{RD_SENSE, RD_BASEBAND, RD_DECODED, RD_DECODED,
                       RD_CODED, RD_CODED})) u_arb (
    .clk, .rst_n, .in_valid(ar_valid), .in_ready(ar_ready), .in_data(ar_data),
    .out_valid(wout_valid), .out_ready(wout_ready), .out_data(wout_data),
    .out_tag(link_tag));

  // streams that cannot wait: the sample FIFOs must never overflow
  a_bb_room:    assert property (@(posedge clk) disable iff (!rst_n)
                                 bb_valid |-> bbf_in_ready);
  a_sense_room: assert property (@(posedge clk) disable iff (!rst_n)
                                 s_valid |-> sfq_in_ready);

endmodule
