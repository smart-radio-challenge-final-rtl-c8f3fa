// sdr_pkg: types, constants and Galois-field helpers shared by the FPGA side
// of the cognitive radio modem.
//
// Numbers taken from the modem description: 80 MHz sample clock, 30 MHz IF,
// 20 kbaud symbol rate, rate-1/2 K=7 convolutional code with generators
// x^6+x^5+x^4+x^3+1 and x^6+x^4+x^3+x+1, RS(63,51) over GF(2^6) with field
// polynomial x^6+x+1, custom-register command numbers R_f and R_d.
// Choices of this design: the bit-order conventions, the roots of the RS
// generator polynomial (alpha^1 .. alpha^12) and the direction flag that
// separates the two meanings of R_f = 2 (upconvert, or RS-decode).
package sdr_pkg;

  // ---------------------------------------------------------------- clocks
  localparam int unsigned CLK_HZ      = 80_000_000;  // DAC/ADC sample rate
  localparam int unsigned IF_HZ       = 30_000_000;  // intermediate frequency
  localparam int unsigned SYMBOL_HZ   = 20_000;      // symbol rate at PSF input
  // phase increment of a 32-bit NCO for the IF: IF_HZ / CLK_HZ * 2^32
  localparam logic [31:0] IF_TUNING_WORD = 32'((64'(IF_HZ) << 32) / 64'(CLK_HZ));
  // sensing: 10 times a second
  localparam int unsigned SENSE_PERIOD_CYC = CLK_HZ / 10;
  // total interpolation from symbols to DAC samples (4000)
  localparam int unsigned TX_INTERP = CLK_HZ / SYMBOL_HZ;

  // ------------------------------------------------------ convolutional code
  // Bit k of a generator mask is the coefficient of x^k; bit 0 is the newest
  // input bit, bit 6 the oldest.
  localparam logic [6:0] CONV_G0 = 7'b1111001;  // x^6+x^5+x^4+x^3+1
  localparam logic [6:0] CONV_G1 = 7'b1011011;  // x^6+x^4+x^3+x+1

  // ------------------------------------------------------- Reed-Solomon code
  localparam int RS_M    = 6;   // bits per symbol
  localparam int RS_N    = 63;  // code word length in symbols
  localparam int RS_K    = 51;  // message length in symbols
  localparam int RS_NPAR = RS_N - RS_K;  // 12 parity symbols, t = 6
  localparam logic [6:0] RS_PRIM = 7'b1000011;  // x^6 + x + 1

  typedef logic [RS_M-1:0] gf_t;

  // multiply two GF(2^6) elements, polynomial basis
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    logic [RS_M-1:0] acc;
    logic [RS_M-1:0] aa;
    acc = '0;
    aa  = a;
    for (int i = 0; i < RS_M; i++) begin
      if (b[i]) acc ^= aa;
      if (aa[RS_M-1]) aa = (aa << 1) ^ RS_PRIM[RS_M-1:0];
      else            aa = aa << 1;
    end
    return acc;
  endfunction

  // alpha^e for 0 <= e < 63 (alpha = x)
  function automatic gf_t gf_pow(input int e);
    gf_t r;
    r = 6'd1;
    for (int i = 0; i < e; i++) r = gf_mul(r, 6'd2);
    return r;
  endfunction

  // multiplicative inverse: a^62 (a != 0)
  function automatic gf_t gf_inv(input gf_t a);
    gf_t r;
    r = 6'd1;
    for (int i = 0; i < 62; i++) r = gf_mul(r, a);
    return r;
  endfunction

  typedef gf_t rs_gen_t [RS_NPAR+1];

  // coefficients g[0..12] of g(x) = prod_{i=1}^{12} (x - alpha^i); g[12] = 1
  function automatic rs_gen_t rs_generator();
    rs_gen_t g;
    gf_t     root;
    for (int j = 0; j <= RS_NPAR; j++) g[j] = '0;
    g[0] = 6'd1;
    for (int i = 1; i <= RS_NPAR; i++) begin
      root = gf_pow(i);
      for (int j = RS_NPAR; j > 0; j--) g[j] = g[j-1] ^ gf_mul(g[j], root);
      g[0] = gf_mul(g[0], root);
    end
    return g;
  endfunction

  // ----------------------------------------------------------- FIR filters
  localparam int COEF_W    = 16;   // filter coefficients, signed Q1.14
  localparam int COEF_FRAC = 14;

  // Reset value of a CPSCIC coefficient: the report prints no coefficients,
  // so the filters start as a linear-interpolation (triangular) kernel of
  // length 2L-1, which has the Nyquist-L property; real coefficients are
  // loaded through the filters' write ports.
  function automatic logic signed [COEF_W-1:0] tri_coef(input int k, input int l);
    int d;
    d = (k > l - 1) ? k - (l - 1) : (l - 1) - k;
    if (k >= 2 * l - 1) return '0;
    return COEF_W'((l - d) * ((1 << COEF_FRAC) / l));
  endfunction

  // ------------------------------------------------------- custom registers
  localparam int NUM_CREGS = 8;        // eight 32-bit shared words
  localparam int CREG_RF   = 0;        // R_f: command from the DSP
  localparam int CREG_RD   = 1;        // R_d: stream tag from the FPGA
  localparam int CREG_DUC_TW   = 2;    // DUC NCO tuning word
  localparam int CREG_DDC_TW   = 3;    // DDC NCO tuning word
  localparam int CREG_SENSE_TW = 4;    // sensing NCO tuning word

  // R_f: bits [1:0] hold the printed command number, bit 4 says whether the
  // command belongs to the receive chain (needed because "2" means both
  // "upconvert" on transmit and "RS decode" on receive).
  localparam int RF_RX_BIT = 4;
  typedef enum logic [2:0] {
    CMD_RS_ENC  = 3'b000,  // R_f = 0: audio, RS encode
    CMD_CONV    = 3'b001,  // R_f = 1: data, convolutional code + interleave
    CMD_DUC     = 3'b010,  // R_f = 2 (transmit): upconvert framed symbols
    CMD_TX_RSV  = 3'b011,
    CMD_RX_RSV0 = 3'b100,
    CMD_RX_RSV1 = 3'b101,
    CMD_RS_DEC  = 3'b110,  // R_f = 2 (receive): RS decode
    CMD_VIT_DEC = 3'b111   // R_f = 3 (receive): deinterleave + Viterbi
  } cmd_e;

  function automatic cmd_e rf_to_cmd(input logic [31:0] rf);
    return cmd_e'({rf[RF_RX_BIT], rf[1:0]});
  endfunction

  // R_d: which stream the FPGA is sending to the DSP
  typedef enum logic [1:0] {
    RD_CODED    = 2'd0,   // coded bits back for mapping and framing
    RD_BASEBAND = 2'd1,   // downconverted receive samples, 2 per symbol
    RD_DECODED  = 2'd2,   // decoded bits
    RD_SENSE    = 2'd3    // sensing samples at 5 MHz
  } rd_e;

endpackage
