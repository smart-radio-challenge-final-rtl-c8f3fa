// tb_cpscic_decim: self-checking test of the receive CPSCIC filter with
// decimation by D = 4 (80 taps).
// Random coefficients are loaded through the write port, random complex
// samples are offered whenever the filter is ready (with random gaps), and
// every output must equal sum_k h[k] x[n-k] >>> 17, saturated, for n the
// index of every fourth input, computed here. Each output must appear
// TAPS + 1 cycles after the input that completes its group.
module tb_cpscic_decim;
  localparam int TAPS = 80, D = 4;
  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [6:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic in_valid = 0, in_ready;
  logic signed [15:0] in_i = '0, in_q = '0, out_i, out_q;
  logic out_valid;
  int checks = 0, failures = 0;

  cpscic_decim dut (.*);

  always #5 clk = ~clk;

  int h[TAPS];
  int xi[$], xq[$], yi[$], yq[$], lat[$];

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  initial begin
    int n_cycle, last_in_cycle;
    bit acc;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      h[k]      = $urandom_range(0, 16000) - 8000;
      coef_we   = 1;
      coef_addr = 7'(k);
      coef_data = 16'(h[k]);
    end
    @(negedge clk) coef_we = 0;
    n_cycle = 0;
    last_in_cycle = 0;
    acc = 0;
    while (yi.size() < 60) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) == 0);
      in_i = 16'($urandom_range(0, 60000) - 30000);
      in_q = 16'($urandom_range(0, 60000) - 30000);
      #1;
      acc = in_valid && in_ready;
      @(posedge clk);
      n_cycle++;
      if (acc) begin
        xi.push_back(int'(in_i));
        xq.push_back(int'(in_q));
        last_in_cycle = n_cycle;
      end
      #1;
      if (out_valid) begin
        yi.push_back(int'(out_i));
        yq.push_back(int'(out_q));
        lat.push_back(n_cycle - last_in_cycle);
      end
    end
    for (int m = 0; m < yi.size(); m++) begin
      int n;
      longint ai, aq;
      n = (m + 1) * D - 1;
      ai = 0;
      aq = 0;
      for (int k = 0; k < TAPS; k++)
        if (n - k >= 0) begin
          ai += longint'(h[k]) * xi[n - k];
          aq += longint'(h[k]) * xq[n - k];
        end
      checks += 3;
      if (yi[m] != sat16(ai >>> 17)) failures++;
      if (yq[m] != sat16(aq >>> 17)) failures++;
      if (lat[m] != TAPS + 1) failures++;
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
