// cmd_router: steers the words arriving from the DSP link to the FPGA
// service the DSP asked for in custom register R_f.
//
// Services (R_f values from the modem description; the receive flag that
// separates the two meanings of R_f = 2 is this design's, see sdr_pkg):
//   port 0  R_f = 0         RS encoder (voice)
//   port 1  R_f = 1         convolutional encoder + interleaver (data)
//   port 2  R_f = 2         digital upconverter (framed symbols)
//   port 3  R_f = 2, rx     RS decoder (voice)
//   port 4  R_f = 3, rx     deinterleaver + Viterbi decoder (data)
// Words that arrive under a reserved command are dropped and counted by a
// pulse on `dropped`.
//
// Interface: one word stream in, five out, valid/ready; the word goes to
// exactly one port. Purely combinational.
module cmd_router
  import sdr_pkg::*;
(
  input  sdr_pkg::cmd_e cmd,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [31:0]   in_data,
  output logic [4:0]    out_valid,
  input  logic [4:0]    out_ready,
  output logic [31:0]   out_data,
  output logic          dropped
);

  logic [2:0] port;
  logic       known;

  always_comb begin
    known = 1'b1;
    port  = 3'd0;
    unique case (cmd)
      CMD_RS_ENC:  port = 3'd0;
      CMD_CONV:    port = 3'd1;
      CMD_DUC:     port = 3'd2;
      CMD_RS_DEC:  port = 3'd3;
      CMD_VIT_DEC: port = 3'd4;
      default:     known = 1'b0;
    endcase
  end

  always_comb begin
    out_valid = '0;
    if (known) out_valid[port] = in_valid;
  end

  assign out_data = in_data;
  assign in_ready = known ? out_ready[port] : 1'b1;
  assign dropped  = in_valid && !known;

endmodule
