// conv_encoder: rate-1/2, constraint-length-7 convolutional encoder for the
// data service.
//
// Each accepted information bit is shifted into a 6-bit state register and
// produces two coded bits, c0 from generator x^6+x^5+x^4+x^3+1 and c1 from
// x^6+x^4+x^3+x+1 (both from the modem description). The coded bits leave
// one at a time, c0 first, so the output can feed the bit-serial block
// interleaver directly; the serial order and the valid/ready handshakes are
// this design's choice.
//
// Interface: in_valid/in_ready/in_bit, out_valid/out_ready/out_bit, all
// AXI-stream style (a transfer happens when valid and ready are both high).
// `clear` returns the state to all zeros between packets.
// Timing: one cycle from an accepted input to c0 on the output; c1 follows
// on the next transfer. Peak rate is one information bit every two cycles.
module conv_encoder
  import sdr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit
);

  logic [5:0] state;      // state[0] = most recent past input
  logic [1:0] coded;      // {c1, c0}
  logic       second;     // 1: c1 is on the output
  logic [6:0] window;

  assign window   = {state, in_bit};
  assign in_ready = !out_valid || (out_ready && second);
  assign out_bit  = second ? coded[1] : coded[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      coded     <= '0;
      second    <= 1'b0;
      out_valid <= 1'b0;
    end else if (clear) begin
      state     <= '0;
      second    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        if (!second) second <= 1'b1;
        else begin
          second    <= 1'b0;
          out_valid <= 1'b0;
        end
      end
      if (in_valid && in_ready) begin
        coded     <= {^(window & CONV_G1), ^(window & CONV_G0)};
        state     <= {state[4:0], in_bit};
        second    <= 1'b0;
        out_valid <= 1'b1;
      end
    end
  end

endmodule
