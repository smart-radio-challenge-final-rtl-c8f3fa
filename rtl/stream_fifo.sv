// stream_fifo: synchronous first-in first-out buffer with valid/ready on
// both sides, used wherever two parts of the modem run at different rates
// (bursts from the DSP link against the fixed symbol rate of the
// upconverter, and the streams queued for the DSP link).
//
// Interface: in_valid/in_ready/in_data, out_valid/out_ready/out_data;
// `clear` empties it. Timing: a word written in one cycle can be read in the
// next; one write and one read per cycle.
module stream_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16   // power of two
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign in_ready  = (wp - rp) != (AW+1)'(DEPTH);
  assign out_valid = (wp != rp);
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (clear) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end

endmodule
