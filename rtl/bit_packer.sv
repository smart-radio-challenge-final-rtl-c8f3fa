// bit_packer: gathers NBITS bits of a bit-serial coding chain into one
// 32-bit word for the DSP link, first bit in bit 0, unused high bits zero
// (counterpart of word_serializer; this design's own link format).
//
// Interface: bit stream in, word stream out, valid/ready on both.
// Timing: the word is offered the cycle after its last bit arrived.
module bit_packer #(
  parameter int unsigned NBITS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_bit,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data
);

  localparam int unsigned CW = $clog2(NBITS + 1);

  logic [CW-1:0] got;
  logic [31:0]   acc;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got       <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clear) begin
      got       <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (got == CW'(NBITS - 1)) begin
          out_data  <= acc | (32'(in_bit) << (NBITS - 1));
          out_valid <= 1'b1;
          acc       <= '0;
          got       <= '0;
        end else begin
          acc <= acc | (32'(in_bit) << got);
          got <= got + 1'b1;
        end
      end
    end
  end

endmodule
