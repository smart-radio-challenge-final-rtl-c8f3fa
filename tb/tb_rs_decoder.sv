// tb_rs_decoder: self-checking test of the RS(63,51) decoder.
// Code words are made by the reference encoder of rs_tb_pkg, 0 to 6 symbol
// errors with random values are put at random distinct positions (message
// and parity alike), and the word is fed with random gaps and output
// back-pressure. The decoder must return the original 51 message symbols,
// report `done` with the number of errors, and not flag a failure. A last
// word with 7 errors must not come back both clean and unflagged. The
// first message symbol must appear 14 cycles after the last input symbol.
module tb_rs_decoder;
  import rs_tb_pkg::*;
  localparam int WORDS = 14;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [5:0] in_sym = '0, out_sym;
  logic out_valid, out_ready = 0;
  logic done, fail;
  logic [3:0] n_corrected;
  int checks = 0, failures = 0, cycle = 0;

  rs_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  int got[$];
  int done_seen = 0;
  int last_fail = 0, last_ncorr = 0;
  always @(posedge clk) if (done) begin
    done_seen++;
    last_fail  = fail;
    last_ncorr = n_corrected;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w <= WORDS; w++) begin
      msg_t m;
      cw_t  c, r;
      int   nerr, taken, t_last_in, t_first_out, done_before;
      bit   acc, oacc;
      int   pos[$];
      taken       = 0;
      t_last_in   = 0;
      t_first_out = -1;
      acc         = 0;
      pos.delete();
      nerr = (w == WORDS) ? 7 : w % 7;
      for (int i = 0; i < 51; i++) m[i] = $urandom_range(0, 63);
      c = encode(m);
      r = c;
      while (pos.size() < nerr) begin
        int p;
        bit dup;
        p   = $urandom_range(0, 62);
        dup = 0;
        foreach (pos[k]) if (pos[k] == p) dup = 1;
        if (!dup) begin
          pos.push_back(p);
          r[p] = c[p] ^ $urandom_range(1, 63);
        end
      end
      got.delete();
      done_before = done_seen;
      while (got.size() < 51 || done_seen == done_before) begin
        @(negedge clk);
        if (acc) in_valid = 0;
        out_ready = ($urandom_range(0, 4) != 0) || (w == 0);
        if (!in_valid && taken < 63 && ($urandom_range(0, 2) != 0 || w == 0)) begin
          in_valid = 1;
          in_sym   = 6'(r[taken]);
        end
        #1;
        acc  = in_valid && in_ready;
        oacc = out_valid && out_ready;
        @(posedge clk);
        if (acc) begin
          taken++;
          t_last_in = cycle;
        end
        if (oacc) got.push_back(int'(out_sym));
        if (out_valid && t_first_out < 0) t_first_out = cycle;
      end
      @(negedge clk);
      in_valid = 0;
      if (w < WORDS) begin
        for (int i = 0; i < 51; i++) begin
          checks++;
          if (got[i] != m[i]) failures++;
        end
        checks += 2;
        if (last_fail != 0) failures++;
        if (last_ncorr != nerr) begin
          failures++;
          $display("word %0d: %0d errors, decoder counted %0d", w, nerr, last_ncorr);
        end
        if (w == 0) begin
          checks++;
          if (t_first_out - t_last_in != 14) begin
            failures++;
            $display("latency %0d", t_first_out - t_last_in);
          end
        end
      end else begin
        bit clean;
        clean = 1;
        for (int i = 0; i < 51; i++) if (got[i] != m[i]) clean = 0;
        checks++;
        if (clean && !last_fail) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("state=%0d pos=%0d got=%0d done_seen=%0d", dut.state, dut.pos, got.size(), done_seen);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
