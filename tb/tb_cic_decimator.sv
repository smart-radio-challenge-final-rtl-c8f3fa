// tb_cic_decimator: self-checking test of the CIC decimator.
// Part 1 (N = 3, R = 8): random input every clock; each output must equal
// the input convolved with the N-fold box impulse response (built here by
// repeated convolution), taken every R-th sample and shifted right by
// N*ceil(log2 R). The sampling phase is found from the first outputs and
// must then hold for all. Part 2 (N = 4, R = 500, the defaults): a constant
// input settles to in * 500^4 / 2^36 and outputs come every 500 cycles.
module tb_cic_decimator;
  localparam int N1 = 3, R1 = 8, S1 = N1 * 3;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] in1 = '0, in2 = 16'sd10000, out1, out2;
  logic v1, v2;
  int checks = 0, failures = 0;

  cic_decimator #(.N(N1), .R(R1), .IW(16), .OW(16)) dut1 (
    .clk, .rst_n, .in_valid(1'b1), .in(in1), .out_valid(v1), .out(out1));
  cic_decimator dut2 (
    .clk, .rst_n, .in_valid(1'b1), .in(in2), .out_valid(v2), .out(out2));

  always #5 clk = ~clk;

  longint h[$];
  longint x[$];
  int     outs[$];
  int     out_n[$];

  initial begin
    int n2 = 0, t_prev2 = -1, gap_bad = 0, last2 = 0;
    h.push_back(1);
    for (int s = 0; s < N1; s++) begin
      longint nh[$];
      nh.delete();
      for (int k = 0; k < h.size() + R1 - 1; k++) begin
        longint acc;
        acc = 0;
        for (int j = 0; j < R1; j++) if (k - j >= 0 && k - j < h.size()) acc += h[k - j];
        nh.push_back(acc);
      end
      h = nh;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in1 = 16'($urandom_range(0, 40000) - 20000);
      x.push_back(longint'(in1));
      @(posedge clk);
      #1;
      if (v1) begin
        outs.push_back(int'(out1));
        out_n.push_back(n);
      end
      if (v2) begin
        if (t_prev2 >= 0 && n - t_prev2 != 500) gap_bad++;
        t_prev2 = n;
        last2 = int'(out2);
        n2++;
      end
    end
    // output j reflects inputs up to index out_n[j] - lag
    begin
      int lag;
      lag = -1;
      for (int d = 0; d < 3 * R1 && lag < 0; d++) begin
        bit ok;
        ok = 1;
        for (int j = 6; j < 16; j++) begin
          longint acc;
          acc = 0;
          for (int k = 0; k < h.size(); k++)
            if (out_n[j] - d - k >= 0) acc += h[k] * x[out_n[j] - d - k];
          if (outs[j] != int'(acc >>> S1)) ok = 0;
        end
        if (ok) lag = d;
      end
      checks++;
      if (lag < 0) begin
        failures++;
        $display("no alignment found");
        lag = 0;
      end
      for (int j = 6; j < outs.size(); j++) begin
        longint acc;
        acc = 0;
        for (int k = 0; k < h.size(); k++)
          if (out_n[j] - lag - k >= 0) acc += h[k] * x[out_n[j] - lag - k];
        checks++;
        if (outs[j] != int'(acc >>> S1)) failures++;
      end
      // one output per R inputs
      checks++;
      if (outs.size() < 4000 / R1 - 2 || outs.size() > 4000 / R1) failures++;
    end
    checks += 3;
    if (gap_bad != 0) failures++;
    if (n2 < 7) failures++;
    if (last2 != int'((longint'(10000) * 500 * 500 * 500 * 500) >>> 36)) begin
      failures++;
      $display("DC %0d", last2);
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
