// tb_rs_encoder: self-checking test of the RS(63,51) encoder.
// Random messages go in with random gaps and back-pressure. Each output
// word must hold the message unchanged in its first 51 symbols, the 12
// parity symbols of a reference long division, and have all 12 syndromes
// r(alpha^1..alpha^12) equal to zero. Rate: with no stalls a code word of
// 63 symbols takes 63 cycles.
module tb_rs_encoder;
  import rs_tb_pkg::*;
  localparam int WORDS = 6;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready;
  logic [5:0] in_sym = '0, out_sym;
  logic out_valid, out_ready = 0;
  int checks = 0, failures = 0, cycle = 0;
  // loop bounds held in variables so the checking loops stay loops
  int n_par = 12, n_cw = 63, n_msg = 51;

  rs_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  int sent[$], got[$];

  task automatic run(int nwords, bit stall, output int span);
    bit acc = 0, oacc;
    int taken = 0, idle = 0, t_first = -1, t_last = 0;
    while (taken < nwords * 51 || idle < 20) begin
      @(negedge clk);
      if (acc) in_valid = 0;
      out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (!in_valid && taken < nwords * 51 && (!stall || $urandom_range(0, 2) != 0)) begin
        in_valid = 1;
        in_sym   = 6'($urandom_range(0, 63));
      end
      #1;
      acc  = in_valid && in_ready;
      oacc = out_valid && out_ready;
      @(posedge clk);
      if (acc) begin
        sent.push_back(int'(in_sym));
        taken++;
      end
      if (oacc) begin
        got.push_back(int'(out_sym));
        if (t_first < 0) t_first = cycle;
        t_last = cycle;
      end
      if (taken == nwords * 51) idle++;
    end
    span = t_last - t_first + 1;
  endtask

  task automatic check_words(int nwords);
    checks++;
    if (got.size() != nwords * 63) begin
      failures++;
      $display("got %0d symbols, expected %0d", got.size(), nwords * 63);
      return;
    end
    for (int w = 0; w < nwords; w++) begin
      msg_t m;
      cw_t  ref_c, dut_c;
      for (int i = 0; i < n_msg; i++) m[i] = sent[w * 51 + i];
      ref_c = encode(m);
      for (int i = 0; i < n_cw; i++) dut_c[i] = got[w * 63 + i];
      for (int i = 0; i < n_cw; i++) begin
        checks++;
        if (dut_c[i] != ref_c[i]) failures++;
      end
      for (int i = 1; i <= n_par; i++) begin
        checks++;
        if (syndrome(dut_c, i) != 0) failures++;
      end
    end
  endtask

  initial begin
    int span;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(WORDS, 1, span);
    check_words(WORDS);
    sent.delete();
    got.delete();
    run(2, 0, span);
    check_words(2);
    checks++;
    if (span != 2 * 63) begin
      failures++;
      $display("two code words took %0d cycles", span);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
