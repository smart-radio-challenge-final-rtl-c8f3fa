// rs_encoder: systematic Reed-Solomon RS(63,51) encoder over GF(2^6) for the
// voice service.
//
// Code parameters (n = 63, k = 51, t = 6, field polynomial x^6 + x + 1) are
// the modem's. The generator polynomial g(x) = prod_{i=1..12} (x - alpha^i)
// is this design's choice (the usual narrow-sense code with alpha = x);
// its coefficients are computed at elaboration by sdr_pkg::rs_generator.
// A 12-stage LFSR divides the message by g(x): the 51 message symbols pass
// straight through and are followed by the 12 parity symbols, highest
// degree first.
//
// Interface: 6-bit symbol streams with valid/ready on both sides; in_ready
// is low while parity is being sent. `clear` abandons a code word.
// Timing: one cycle of latency; 63 output symbols per 51 input symbols.
module rs_encoder
  import sdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      in_valid,
  output logic      in_ready,
  input  gf_t       in_sym,
  output logic      out_valid,
  input  logic      out_ready,
  output gf_t       out_sym
);

  localparam rs_gen_t G = rs_generator();

  gf_t        par [RS_NPAR];   // par[11] is the highest-degree remainder
  logic [5:0] cnt;             // symbols emitted in the current code word
  logic       out_free;
  gf_t        fb;

  assign out_free = !out_valid || out_ready;
  assign in_ready = out_free && (cnt < 6'(RS_K));
  assign fb       = in_sym ^ par[RS_NPAR-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < RS_NPAR; j++) par[j] <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else if (clear) begin
      for (int j = 0; j < RS_NPAR; j++) par[j] <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (cnt < 6'(RS_K)) begin
        if (in_valid && in_ready) begin
          out_sym   <= in_sym;
          out_valid <= 1'b1;
          cnt       <= cnt + 1'b1;
          par[0]    <= gf_mul(G[0], fb);
          for (int j = 1; j < RS_NPAR; j++) par[j] <= par[j-1] ^ gf_mul(G[j], fb);
        end
      end else if (out_free) begin
        out_sym   <= par[RS_NPAR-1];
        out_valid <= 1'b1;
        for (int j = RS_NPAR-1; j > 0; j--) par[j] <= par[j-1];
        par[0] <= '0;
        cnt    <= (cnt == 6'(RS_N - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end

endmodule
