// word_serializer: sends the low NBITS bits of each 32-bit word from the
// DSP link one bit at a time, least significant bit first, into the
// bit-serial coding chains (encoder and decoder paths). Packing of bits into
// link words is this design's choice; the modem only speaks of binary
// vectors.
//
// Interface: word stream in, bit stream out, valid/ready on both.
// Timing: NBITS cycles per word when the receiver is always ready.
module word_serializer #(
  parameter int unsigned NBITS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        out_bit
);

  localparam int unsigned CW = $clog2(NBITS + 1);

  logic [31:0]   sh;
  logic [CW-1:0] left;

  assign out_valid = (left != '0);
  assign out_bit   = sh[0];
  assign in_ready  = (left == '0) || (left == CW'(1) && out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (clear) begin
      left <= '0;
    end else if (in_valid && in_ready) begin
      sh   <= in_data;
      left <= CW'(NBITS);
    end else if (out_valid && out_ready) begin
      sh   <= sh >> 1;
      left <= left - 1'b1;
    end
  end

endmodule
