// vpss_port: FPGA end of the video-port (VPSS) data link to the DSP,
// converting between the DSP's 16-bit port and the FPGA's 32-bit data bus.
//
// As in the modem description it has two halves: the back end (VPBE) takes
// 16-bit transfers coming from the DSP and assembles 32-bit words; the
// front end (VPFE) splits 32-bit words going to the DSP into two 16-bit
// transfers and sends R_d, the tag of the word, with them. The halfword
// order (low half first), the valid/ready handshakes and sending the tag
// alongside are this design's choices; the video-port timing of the real
// DSP port is not modelled.
//
// Interface: dsp-side valid/ready/data for each direction; fpga-side
// 32-bit valid/ready streams. `clear` drops a half-assembled word.
// Timing: VPBE: a word is offered the cycle after its high half arrived.
// VPFE: two cycles per word when the DSP is always ready.
module vpss_port (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  // DSP -> FPGA (VPBE)
  input  logic        be_valid,
  output logic        be_ready,
  input  logic [15:0] be_data,
  output logic        word_in_valid,
  input  logic        word_in_ready,
  output logic [31:0] word_in_data,
  // FPGA -> DSP (VPFE)
  input  logic        word_out_valid,
  output logic        word_out_ready,
  input  logic [31:0] word_out_data,
  input  logic [1:0]  word_out_tag,
  output logic        fe_valid,
  input  logic        fe_ready,
  output logic [15:0] fe_data,
  output logic [1:0]  fe_tag
);

  // ---------------------------------------------------------------- VPBE
  logic        have_lo;
  logic [15:0] lo;

  assign be_ready = !word_in_valid || word_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_lo       <= 1'b0;
      lo            <= '0;
      word_in_valid <= 1'b0;
      word_in_data  <= '0;
    end else if (clear) begin
      have_lo       <= 1'b0;
      word_in_valid <= 1'b0;
    end else begin
      if (word_in_valid && word_in_ready) word_in_valid <= 1'b0;
      if (be_valid && be_ready) begin
        if (!have_lo) begin
          lo      <= be_data;
          have_lo <= 1'b1;
        end else begin
          word_in_data  <= {be_data, lo};
          word_in_valid <= 1'b1;
          have_lo       <= 1'b0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- VPFE
  logic        hi_phase;   // 1: the high half is on fe_data

  assign fe_valid       = word_out_valid;
  assign fe_data        = hi_phase ? word_out_data[31:16] : word_out_data[15:0];
  assign fe_tag         = word_out_tag;
  assign word_out_ready = fe_ready && hi_phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     hi_phase <= 1'b0;
    else if (clear)                 hi_phase <= 1'b0;
    else if (fe_valid && fe_ready)  hi_phase <= !hi_phase;
  end

endmodule
