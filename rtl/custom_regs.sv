// custom_regs: the eight 32-bit custom registers shared between the DSP and
// the FPGA, used for configuration and for handshaking.
//
// From the modem description: eight 32-bit words; R_f carries the command
// the DSP wants the FPGA to perform, R_d tells the DSP what kind of data it
// is receiving, and the FPGA reacts to every change the DSP makes. This
// design's choices: the register map (0 = R_f, 1 = R_d, 2..4 = NCO tuning
// words of the upconverter, downconverter and sensing mixer, reset to the
// 30 MHz IF; 5..7 free), R_d being written only by the FPGA, and a simple
// synchronous bus on the DSP side standing in for the on-chip peripheral
// bus.
//
// Interface: DSP side: dsp_we/dsp_addr/dsp_wdata write, dsp_rdata reads
// combinationally. FPGA side: rd_we/rd_wdata update R_d; all registers are
// visible on `regs`; rf_changed pulses the cycle after R_f was written with
// a new value.
module custom_regs
  import sdr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 dsp_we,
  input  logic [2:0]           dsp_addr,
  input  logic [31:0]          dsp_wdata,
  output logic [31:0]          dsp_rdata,
  input  logic                 rd_we,
  input  logic [31:0]          rd_wdata,
  output logic [31:0]          regs [NUM_CREGS],
  output logic                 rf_changed
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CREGS; i++) regs[i] <= '0;
      regs[CREG_DUC_TW]   <= IF_TUNING_WORD;
      regs[CREG_DDC_TW]   <= IF_TUNING_WORD;
      regs[CREG_SENSE_TW] <= IF_TUNING_WORD;
      rf_changed          <= 1'b0;
    end else begin
      rf_changed <= dsp_we && (dsp_addr == 3'(CREG_RF)) &&
                    (dsp_wdata != regs[CREG_RF]);
      if (dsp_we && dsp_addr != 3'(CREG_RD)) regs[dsp_addr] <= dsp_wdata;
      if (rd_we) regs[CREG_RD] <= rd_wdata;
    end
  end

  assign dsp_rdata = regs[dsp_addr];

endmodule
