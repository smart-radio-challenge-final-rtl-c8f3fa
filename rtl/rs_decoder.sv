// rs_decoder: Reed-Solomon RS(63,51) decoder over GF(2^6), t = 6, for the
// voice service. It is the receive-side counterpart of rs_encoder.
//
// The modem only names an RS decoder; the method here is this design's own,
// built for small area rather than speed, processing one code word at a time:
//   1. LOAD     63 symbols are stored and the 12 syndromes S1..S12 are
//               accumulated by Horner's rule (r(alpha^i)).
//   2. BM       12 cycles of inversion-free Berlekamp-Massey give the error
//               locator Lambda(x) (scaled by a nonzero constant).
//   3. OMEGA    one cycle forms the evaluator Omega(x) = S(x)Lambda(x) mod x^12.
//   4. CHIEN    one position per cycle from x^62 down to x^0: Lambda, Omega and
//               the odd part of Lambda are evaluated at alpha^-j; where
//               Lambda vanishes the Forney value Omega / (alpha^j Lambda'(.))
//               is added to the stored symbol. Positions 62..12 (the message)
//               are sent out; positions 11..0 are only counted.
// After the last position `done` pulses with the number of corrected symbols
// and `fail` set when the number of roots found differs from the degree of
// Lambda (more than 6 symbol errors); a failed word leaves uncorrected,
// because its message has already been sent when the failure is known.
//
// Interface: 6-bit symbol streams with valid/ready; in_ready is high only in
// LOAD. Timing: per code word 63 load cycles + 12 + 1 + 63, plus output
// back-pressure; the first message symbol appears 14 cycles after the last
// input (12 BM + 1 OMEGA + 1).
module rs_decoder
  import sdr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  gf_t        in_sym,
  output logic       out_valid,
  input  logic       out_ready,
  output gf_t        out_sym,
  output logic       done,
  output logic       fail,
  output logic [3:0] n_corrected
);

  localparam int T2 = RS_NPAR;       // 12 syndromes
  localparam int LD = RS_NPAR / 2;   // locator degree bound t = 6

  typedef gf_t gf_tab_t [64];
  function automatic gf_tab_t make_inv_tab();
    gf_tab_t tab;
    tab[0] = '0;
    for (int a = 1; a < 64; a++) tab[a] = gf_inv(6'(a));
    return tab;
  endfunction
  function automatic gf_tab_t make_pow_tab();
    gf_tab_t tab;
    for (int e = 0; e < 64; e++) tab[e] = gf_pow(e % 63);
    return tab;
  endfunction
  localparam gf_tab_t INV = make_inv_tab();
  localparam gf_tab_t POW = make_pow_tab();

  typedef enum logic [2:0] {S_LOAD, S_BM, S_OMEGA, S_CHIEN, S_DONE} state_e;
  state_e state;

  gf_t        buff [RS_N];          // buff[j] holds the coefficient of x^j
  gf_t        syn  [T2];            // syn[i] = S_{i+1}
  gf_t        lam  [LD+1];
  gf_t        bpol [LD+1];
  gf_t        gam;
  logic [3:0] lreg;                 // current locator length L
  logic [3:0] r;                    // BM iteration
  gf_t        lt   [LD+1];          // Chien terms of Lambda
  gf_t        ot   [T2];            // Chien terms of Omega
  gf_t        xinv;                 // alpha^-j for the current position
  logic [5:0] pos;                  // current position j
  logic [3:0] nroots;

  // ------------------------------------------------- BM discrepancy (comb.)
  gf_t delta;
  always_comb begin
    delta = '0;
    for (int j = 0; j <= LD; j++) begin
      int idx;
      idx = int'(r) - j;            // S_{r+1-j} is syn[r-j]
      if (idx >= 0) delta ^= gf_mul(lam[j], syn[idx]);
    end
  end

  // --------------------------------------------------- Chien sums (comb.)
  gf_t lam_val, odd_val, om_val, err_val;
  always_comb begin
    lam_val = '0;
    odd_val = '0;
    om_val  = '0;
    for (int i = 0; i <= LD; i++) begin
      lam_val ^= lt[i];
      if (i % 2 == 1) odd_val ^= lt[i];
    end
    for (int i = 0; i < T2; i++) om_val ^= ot[i];
    // x * Lambda'(x) equals the odd part of Lambda, so
    // e = Omega(X^-1) / Lambda'(X^-1) = Omega * X^-1 / odd(X^-1)
    err_val = gf_mul(gf_mul(om_val, xinv), INV[odd_val]);
  end

  assign in_ready  = (state == S_LOAD);
  assign out_sym   = buff[pos] ^ ((lam_val == '0) ? err_val : '0);
  assign out_valid = (state == S_CHIEN) && (pos >= 6'(RS_NPAR));

  logic adv;   // Chien step taken this cycle
  assign adv = (state == S_CHIEN) && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      pos         <= 6'(RS_N - 1);
      r           <= '0;
      lreg        <= '0;
      gam         <= 6'd1;
      xinv        <= '0;
      nroots      <= '0;
      done        <= 1'b0;
      fail        <= 1'b0;
      n_corrected <= '0;
      for (int i = 0; i < T2; i++) begin
        syn[i] <= '0;
        ot[i]  <= '0;
      end
      for (int i = 0; i <= LD; i++) begin
        lam[i]  <= '0;
        bpol[i] <= '0;
        lt[i]   <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          buff[pos] <= in_sym;
          for (int i = 0; i < T2; i++)
            syn[i] <= gf_mul(syn[i], POW[i+1]) ^ in_sym;
          if (pos == '0) begin
            state <= S_BM;
            r     <= '0;
            lreg  <= '0;
            gam   <= 6'd1;
            for (int i = 0; i <= LD; i++) begin
              lam[i]  <= (i == 0) ? 6'd1 : '0;
              bpol[i] <= (i == 0) ? 6'd1 : '0;
            end
          end else begin
            pos <= pos - 1'b1;
          end
        end
        S_BM: begin
          // Lambda <- gamma*Lambda - delta*x*B
          for (int i = 0; i <= LD; i++)
            lam[i] <= gf_mul(gam, lam[i]) ^ ((i > 0) ? gf_mul(delta, bpol[i-1]) : '0);
          if (delta != '0 && {lreg, 1'b0} <= {1'b0, r}) begin
            for (int i = 0; i <= LD; i++) bpol[i] <= lam[i];
            lreg <= r + 1'b1 - lreg;
            gam  <= delta;
          end else begin
            for (int i = 0; i <= LD; i++) bpol[i] <= (i > 0) ? bpol[i-1] : '0;
          end
          if (r == 4'(T2 - 1)) state <= S_OMEGA;
          r <= r + 1'b1;
        end
        S_OMEGA: begin
          // Omega_i = sum_j Lambda_j S_{i+1-j}; Chien terms start at x^62,
          // where alpha^-62 = alpha^1: term_i = coef_i * alpha^i
          for (int i = 0; i < T2; i++) begin
            gf_t acc;
            acc = '0;
            for (int j = 0; j <= LD; j++)
              if (j <= i) acc ^= gf_mul(lam[j], syn[i-j]);
            ot[i] <= gf_mul(acc, POW[i]);
          end
          for (int i = 0; i <= LD; i++) lt[i] <= gf_mul(lam[i], POW[i]);
          xinv   <= POW[1];
          pos    <= 6'(RS_N - 1);
          nroots <= '0;
          state  <= S_CHIEN;
        end
        S_CHIEN: if (adv) begin
          if (lam_val == '0) nroots <= nroots + 1'b1;
          for (int i = 0; i <= LD; i++) lt[i] <= gf_mul(lt[i], POW[i]);
          for (int i = 0; i < T2; i++)  ot[i] <= gf_mul(ot[i], POW[i]);
          xinv <= gf_mul(xinv, POW[1]);
          if (pos == '0) state <= S_DONE;
          else           pos   <= pos - 1'b1;
        end
        S_DONE: begin
          done        <= 1'b1;
          n_corrected <= nroots;
          fail        <= (nroots != lreg);
          for (int i = 0; i < T2; i++) syn[i] <= '0;
          pos   <= 6'(RS_N - 1);
          state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
