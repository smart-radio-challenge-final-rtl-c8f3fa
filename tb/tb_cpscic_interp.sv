// tb_cpscic_interp: self-checking test of the transmit CPSCIC filter with
// upsampling by L = 8 (80 taps).
// Part 1 uses the reset coefficients (triangular Nyquist-8 kernel): every
// eighth output must equal an input symbol exactly (zero ISI). Part 2 loads
// random coefficients through the write port and compares every output
// with sum_j h[j*L+p] x[n-j] >>> 14, saturated, computed here. Random
// back-pressure on the output; the cycle count between accepted outputs
// is checked against TAPS/L + 1.
module tb_cpscic_interp;
  localparam int TAPS = 80, L = 8, NJ = TAPS / L;
  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [6:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic in_valid = 1, in_ready;
  logic signed [15:0] in_i = '0, in_q = '0, out_i, out_q;
  logic out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  cpscic_interp dut (.*);

  always #5 clk = ~clk;

  int h[TAPS];
  int xi[$], xq[$], yi[$], yq[$];

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  task automatic stream(int nout, bit stall, output int min_gap);
    bit acc, oacc;
    int since;
    acc = 0;
    since = 0;
    min_gap = 1000;
    while (yi.size() < nout) begin
      @(negedge clk);
      if (acc) begin
        in_i = 16'($urandom_range(0, 30000) - 15000);
        in_q = 16'($urandom_range(0, 30000) - 15000);
      end
      out_ready = stall ? ($urandom_range(0, 2) == 0) : 1'b1;
      #1;
      acc  = in_valid && in_ready;
      oacc = out_valid && out_ready;
      @(posedge clk);
      since++;
      if (acc) begin
        xi.push_back(int'(in_i));
        xq.push_back(int'(in_q));
      end
      if (oacc) begin
        yi.push_back(int'(out_i));
        yq.push_back(int'(out_q));
        if (!stall && yi.size() > 2 && since < min_gap) min_gap = since;
        since = 0;
      end
    end
  endtask

  initial begin
    int gap;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    in_i = 16'sd1234;
    in_q = -16'sd999;
    // part 1: reset kernel, no stalls; output 0 is the reset zero, output
    // 1 + 8n + p is phase p of symbol n
    stream(1 + 8 * 30, 0, gap);
    for (int n = 0; n < 30; n++) begin
      checks += 2;
      if (yi[1 + 8 * n + 7] != xi[n]) failures++;
      if (yq[1 + 8 * n + 7] != xq[n]) failures++;
    end
    checks++;
    if (gap != NJ + 2) begin
      failures++;
      $display("output spacing %0d cycles", gap);
    end
    // part 2: random coefficients
    out_ready = 0;
    rst_n = 0;
    @(negedge clk) rst_n = 1;
    xi.delete(); xq.delete(); yi.delete(); yq.delete();
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      h[k]      = $urandom_range(0, 20000) - 10000;
      coef_we   = 1;
      coef_addr = 7'(k);
      coef_data = 16'(h[k]);
    end
    @(negedge clk) coef_we = 0;
    stream(1 + 8 * 40, 1, gap);
    for (int t = 0; t < 8 * 40; t++) begin
      int n, p;
      longint ai, aq;
      n = t / L;
      p = t % L;
      ai = 0;
      aq = 0;
      for (int j = 0; j < NJ; j++)
        if (n - j >= 0) begin
          ai += longint'(h[j * L + p]) * xi[n - j];
          aq += longint'(h[j * L + p]) * xq[n - j];
        end
      checks += 2;
      if (yi[1 + t] != sat16(ai >>> 14)) failures++;
      if (yq[1 + t] != sat16(aq >>> 14)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
