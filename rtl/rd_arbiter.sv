// rd_arbiter: chooses which FPGA result stream uses the link to the DSP and
// tags each word with R_d, the stream type the DSP dispatches on.
//
// The modem defines the R_d values (0 coded bits, 1 downconverted receive
// samples, 2 decoded bits, 3 sensing samples); the arbitration is this
// design's: fixed priority, input 0 highest, re-decided for every word but
// held while a word waits for the link (so valid/data stay stable).
//
// Interface: NSRC valid/ready word streams with a tag each (TAGS parameter),
// one output stream with out_tag. A registered `grant` lock keeps the
// choice while out_valid && !out_ready.
module rd_arbiter
  import sdr_pkg::*;
#(
  parameter int unsigned NSRC = 6,
  parameter logic [1:0]  TAGS [NSRC] = '{RD_SENSE, RD_BASEBAND, RD_DECODED,
                                         RD_DECODED, RD_CODED, RD_CODED}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NSRC-1:0]   in_valid,
  output logic [NSRC-1:0]   in_ready,
  input  logic [31:0]       in_data [NSRC],
  output logic              out_valid,
  input  logic              out_ready,
  output logic [31:0]       out_data,
  output logic [1:0]        out_tag
);

  localparam int unsigned GW = $clog2(NSRC);

  logic [GW-1:0] pick, held, sel;
  logic          locked;

  always_comb begin
    pick = '0;
    for (int i = NSRC - 1; i >= 0; i--) if (in_valid[i]) pick = GW'(i);
  end

  assign sel       = locked ? held : pick;
  assign out_valid = in_valid[sel];
  assign out_data  = in_data[sel];
  assign out_tag   = TAGS[sel];

  always_comb begin
    in_ready      = '0;
    in_ready[sel] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      held   <= '0;
    end else begin
      locked <= out_valid && !out_ready;
      held   <= sel;
    end
  end

  // a word once offered stays offered until it is taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_data);
  endproperty
  a_hold: assert property (p_hold);

endmodule
