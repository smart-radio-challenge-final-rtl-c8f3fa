// tb_duc: self-checking test of the digital upconverter at its default
// sizes (CPSCIC x8, CIC x500, 30 MHz IF at 80 MS/s).
// A constant symbol (I, Q) is offered continuously. Checks: one symbol is
// taken every 4000 cycles; after settling the DAC signal repeats every 8
// samples (30/80 MHz = 3/8 cycle per sample) and its peak equals
// |I + jQ| * (500^3 / 2^27) * 32767 / 2^16 (unit-gain reset kernel) within
// 1.5 %; the DAC is silent while tx_enable is low.
module tb_duc;
  logic clk = 0, rst_n = 0, tx_enable = 1;
  logic [31:0] tuning_word = 32'h6000_0000;
  logic coef_we = 0;
  logic [6:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic sym_valid = 1, sym_ready;
  logic signed [15:0] sym_i = 16'sd12000, sym_q = -16'sd9000, dac_out;
  int checks = 0, failures = 0;

  duc dut (.*);

  always #5 clk = ~clk;

  initial begin
    int takes[$];
    int hist[$];
    int peak, bad_period, silent_bad;
    real expect_peak;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 80000; n++) begin
      @(posedge clk);
      if (sym_ready) takes.push_back(n);
      #1;
      hist.push_back(int'(dac_out));
    end
    checks++;
    for (int k = 1; k < takes.size(); k++) if (takes[k] - takes[k-1] != 4000) begin
      failures++;
      break;
    end
    peak = 0;
    bad_period = 0;
    for (int n = 70000; n < 79990; n++) begin
      int a;
      a = hist[n] < 0 ? -hist[n] : hist[n];
      if (a > peak) peak = a;
      if (hist[n + 8] - hist[n] > 3 || hist[n] - hist[n + 8] > 3) bad_period++;
    end
    expect_peak = $sqrt(12000.0 * 12000.0 + 9000.0 * 9000.0) *
                  (125000000.0 / 134217728.0) * 32767.0 / 65536.0;
    checks += 2;
    if (bad_period != 0) failures++;
    if (real'(peak) < 0.985 * expect_peak || real'(peak) > 1.015 * expect_peak) begin
      failures++;
      $display("peak %0d, expected %f", peak, expect_peak);
    end
    // transmitter silenced
    @(negedge clk) tx_enable = 0;
    silent_bad = 0;
    @(posedge clk);
    repeat (300) begin
      @(posedge clk) #1;
      if (dac_out != 0) silent_bad++;
    end
    @(negedge clk) tx_enable = 1;
    repeat (3) @(posedge clk);
    #1;
    checks += 2;
    if (silent_bad != 0) failures++;
    if (dac_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
