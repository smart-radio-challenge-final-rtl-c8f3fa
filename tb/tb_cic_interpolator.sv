// tb_cic_interpolator: self-checking test of the CIC interpolator.
// Part 1 (N = 3, R = 8): random input samples; every output sample is
// compared exactly with the zero-stuffed input convolved with the N-fold
// box impulse response (built here by repeated convolution) and shifted
// right by (N-1)*ceil(log2 R); the delay found must be the documented
// (N-1)*R + N + 1 cycles. Part 2 (N = 4, R = 500, the defaults):
// a constant input must settle to in * R^(N-1) / 2^27, and one sample must
// be taken every 500 cycles.
module tb_cic_interpolator;
  localparam int N1 = 3, R1 = 8, S1 = (N1 - 1) * 3;
  logic clk = 0, rst_n = 0;
  logic in_valid1 = 0, in_ready1, in_valid2 = 0, in_ready2;
  logic signed [15:0] in1 = '0, in2 = '0, out1, out2;
  int checks = 0, failures = 0, cycle = 0;

  cic_interpolator #(.N(N1), .R(R1), .IW(16), .OW(16)) dut1 (
    .clk, .rst_n, .in_valid(in_valid1), .in_ready(in_ready1), .in(in1), .out(out1));
  cic_interpolator dut2 (
    .clk, .rst_n, .in_valid(in_valid2), .in_ready(in_ready2), .in(in2), .out(out2));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  longint h[$];
  longint u[$];     // zero-stuffed input, one entry per clock from the first take
  int     outs[$];

  initial begin
    int first_take = -1, takes2 = 0, t_first2 = -1, t_last2 = 0;
    // impulse response: N-fold convolution of a length-R box
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
    in_valid1 = 1;
    in_valid2 = 1;
    in2 = 16'sd10000;
    for (int n = 0; n < 3000; n++) begin
      bit take1, take2;
      @(negedge clk);
      if (in_ready1) in1 = 16'($urandom_range(0, 40000) - 20000);
      #1;
      take1 = in_ready1;
      take2 = in_ready2;
      @(posedge clk);
      if (take1 && first_take < 0) first_take = n;
      if (first_take >= 0) u.push_back(take1 ? longint'(in1) : 0);
      if (take2) begin
        takes2++;
        if (t_first2 < 0) t_first2 = cycle;
        t_last2 = cycle;
      end
      #1;
      outs.push_back(int'(out1));
    end
    // out1 observed after clock edge c (outs index c-1) reflects u up to
    // index c - first_take - lat; find lat, then check every sample
    begin
      int lat;
      lat = -1;
      for (int d = 0; d <= (N1 + 1) * R1 + 8 && lat < 0; d++) begin
        bit ok;
        ok = 1;
        for (int c = first_take + d + h.size(); c < first_take + d + h.size() + 40; c++) begin
          longint acc;
          acc = 0;
          for (int k = 0; k < h.size(); k++)
            if (c - first_take - d - k >= 0) acc += h[k] * u[c - first_take - d - k];
          if (outs[c] != int'(acc >>> S1)) ok = 0;
        end
        if (ok) lat = d;
      end
      $display("latency %0d cycles", lat);
      checks++;
      if (lat != (N1 - 1) * R1 + N1 + 1) failures++;
      if (lat < 0) lat = 0;
      for (int c = first_take + lat + h.size(); c < 3000; c++) begin
        longint acc;
        acc = 0;
        for (int k = 0; k < h.size(); k++)
          if (c - first_take - lat - k >= 0) acc += h[k] * u[c - first_take - lat - k];
        checks++;
        if (outs[c] != int'(acc >>> S1)) failures++;
      end
    end
    // part 2: DC gain at the defaults and the input rate
    checks += 2;
    if ((t_last2 - t_first2) != 500 * (takes2 - 1)) failures++;
    begin
      int expect_dc;
      expect_dc = int'((longint'(10000) * 500 * 500 * 500) >>> 27);
      if (int'(out2) < expect_dc - 2 || int'(out2) > expect_dc + 2) begin
        failures++;
        $display("DC out %0d, expected %0d", out2, expect_dc);
      end
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
