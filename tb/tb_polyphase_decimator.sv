// tb_polyphase_decimator: self-checking test of the sensing-path polyphase
// decimator (M = 16, 64 taps).
// Part 1 checks the reset coefficients (16-sample average): a constant input
// comes out unchanged. Part 2 loads random coefficients, restarts the
// commutator together with the first sample, and feeds random samples with
// random gaps; every output must equal sum_k h[k] x[16m + 15 - k] >>> 14,
// saturated, computed here on the accepted samples, and appear one cycle
// after the block's last sample. A second restart in mid-block must
// realign the blocks.
module tb_polyphase_decimator;
  localparam int M = 16, TAPS = 64;
  logic clk = 0, rst_n = 0, restart = 0;
  logic coef_we = 0;
  logic [5:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic in_valid = 0;
  logic signed [15:0] in_i = '0, in_q = '0, out_i, out_q;
  logic out_valid;
  int checks = 0, failures = 0;

  polyphase_decimator dut (.*);

  always #5 clk = ~clk;

  int h[TAPS];
  int xi[$], xq[$], yi[$], yq[$];

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // feed n samples (gaps if `gaps`), restart with the first one
  task automatic feed(int n, bit gaps);
    int sent;
    bit was_valid;
    sent = 0;
    while (sent < n) begin
      @(negedge clk);
      in_valid = !gaps || ($urandom_range(0, 3) != 0);
      restart  = (sent == 0) && in_valid;
      in_i = 16'($urandom_range(0, 60000) - 30000);
      in_q = 16'($urandom_range(0, 60000) - 30000);
      was_valid = in_valid;
      @(posedge clk);
      if (was_valid) begin
        xi.push_back(int'(in_i));
        xq.push_back(int'(in_q));
        sent++;
      end
      #1;
      if (out_valid) begin
        yi.push_back(int'(out_i));
        yq.push_back(int'(out_q));
        checks++;
        if (sent % M != 0) failures++;   // output right after a block's end
      end
    end
    @(negedge clk);
    in_valid = 0;
    restart  = 0;
    @(posedge clk) #1;
    if (out_valid) failures++;
  endtask

  task automatic check_blocks();
    for (int m = 0; m < yi.size(); m++) begin
      longint ai, aq;
      ai = 0;
      aq = 0;
      for (int k = 0; k < TAPS; k++)
        if (M * m + M - 1 - k >= 0) begin
          ai += longint'(h[k]) * xi[M * m + M - 1 - k];
          aq += longint'(h[k]) * xq[M * m + M - 1 - k];
        end
      checks += 2;
      if (yi[m] != sat16(ai >>> 14)) failures++;
      if (yq[m] != sat16(aq >>> 14)) failures++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // part 1: reset kernel averages 16 samples
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_i = 16'sd5000;
      in_q = -16'sd7000;
      @(posedge clk) #1;
      if (out_valid) begin
        checks += 2;
        if (out_i != 16'sd5000) failures++;
        if (out_q != -16'sd7000) failures++;
      end
    end
    // part 2: random coefficients
    @(negedge clk);
    in_valid = 0;
    rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      h[k]      = $urandom_range(0, 16000) - 8000;
      coef_we   = 1;
      coef_addr = 6'(k);
      coef_data = 16'(h[k]);
    end
    @(negedge clk) coef_we = 0;
    feed(M * 30, 1);
    check_blocks();
    checks++;
    if (yi.size() != 30) failures++;
    // mid-block restart: 7 stray samples, then a fresh aligned run; the
    // branch memories still hold old samples, so compare only blocks whose
    // taps all lie inside the fresh run
    feed(7, 0);
    xi.delete(); xq.delete(); yi.delete(); yq.delete();
    feed(M * 12, 0);
    checks++;
    if (yi.size() != 12) failures++;
    for (int m = TAPS / M - 1; m < yi.size(); m++) begin
      longint ai;
      ai = 0;
      for (int k = 0; k < TAPS; k++) ai += longint'(h[k]) * xi[M * m + M - 1 - k];
      checks++;
      if (yi[m] != sat16(ai >>> 14)) failures++;
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
