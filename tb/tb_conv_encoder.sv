// tb_conv_encoder: self-checking test of the K=7 rate-1/2 encoder.
// Random information bits are pushed with random stalls on both sides; the
// expected coded bits come from a model that applies the two generator
// polynomials, written out as tap lists, to the input history. A second
// phase with no stalls checks the rate of one information bit per two
// cycles. Stimulus changes on the falling edge; transfers are decided from
// the values seen just before the rising edge.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready, in_bit = 0;
  logic out_valid, out_ready = 0, out_bit;
  int checks = 0, failures = 0;
  int cycle = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  bit sent[$];
  bit got[$];

  function automatic bit model(int n, int which);
    // c0 taps: x^0 x^3 x^4 x^5 x^6, c1 taps: x^0 x^1 x^3 x^4 x^6
    int taps0[5] = '{0, 3, 4, 5, 6};
    int taps1[5] = '{0, 1, 3, 4, 6};
    bit r = 0;
    for (int i = 0; i < 5; i++) begin
      int d = (which == 0) ? taps0[i] : taps1[i];
      if (n - d >= 0) r ^= sent[n - d];
    end
    return r;
  endfunction

  // one loop pass per clock: drive on the falling edge, decide transfers
  // just before the rising edge. stall = random gaps and back-pressure.
  task automatic run(int nbits, bit stall, output int cycles);
    int  taken = 0;
    int  t0 = -1;
    bit  acc = 0, oacc;
    int  idle = 0;
    while (taken < nbits || idle < 8) begin
      @(negedge clk);
      if (acc) in_valid = 0;
      out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (!in_valid && taken < nbits && (!stall || $urandom_range(0, 2) == 0)) begin
        in_valid = 1;
        in_bit   = 1'($urandom_range(0, 1));
      end
      #1;
      acc  = in_valid && in_ready;
      oacc = out_valid && out_ready;
      @(posedge clk);
      if (acc) begin
        if (t0 < 0) t0 = cycle;
        sent.push_back(in_bit);
        taken++;
        if (taken == nbits) cycles = cycle - t0;
      end
      if (oacc) got.push_back(out_bit);
      if (taken == nbits && !out_valid) idle++;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic check_all();
    checks++;
    if (got.size() != 2 * sent.size()) begin
      failures++;
      $display("count mismatch: %0d coded for %0d info", got.size(), sent.size());
    end
    for (int n = 0; n < sent.size() && 2 * n + 1 < got.size(); n++) begin
      checks += 2;
      if (got[2*n] != model(n, 0))   failures++;
      if (got[2*n+1] != model(n, 1)) failures++;
    end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(300, 1, cyc);
    check_all();
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    sent.delete();
    got.delete();
    run(100, 0, cyc);
    check_all();
    // one information bit every two cycles: 99 gaps of 2 cycles
    checks++;
    if (cyc != 198) begin
      failures++;
      $display("rate: %0d cycles between first and last of 100 bits", cyc);
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
