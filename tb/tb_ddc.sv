// tb_ddc: self-checking test of the digital downconverter at its default
// sizes (CIC /500, CPSCIC /4, 30 MHz IF, 40 kS/s out, reset PSF kernel with
// unit DC gain). Phase 1: a carrier exactly at the IF with phase phi gives a
// constant baseband of magnitude 2*A*(500^4/2^36); moving the carrier phase
// by 1 rad moves the baseband angle by 1 rad (the absolute angle includes
// the fixed NCO latency).
// Phase 2: a carrier 5 MHz away is rejected to under 2 % of that level.
// Also checked: one output per 2000 ADC samples.
module tb_ddc;
  localparam real PI = 3.14159265358979;
  localparam real A  = 3000.0;
  logic clk = 0, rst_n = 0;
  logic [31:0] tuning_word = 32'h6000_0000;
  logic coef_we = 0;
  logic [6:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic signed [13:0] adc_in = '0;
  logic bb_valid;
  logic signed [15:0] bb_i, bb_q;
  int checks = 0, failures = 0;
  longint n = 0;
  real freq = 30.0, phi = 0.7;

  ddc dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    adc_in <= 14'($rtoi(A * $cos(2.0 * PI * (freq / 80.0) * real'(n) + phi)));
    n <= n + 1;
  end

  initial begin
    longint last_t;
    int nout;
    real mag, ang, ang1, ref_mag, d;
    ref_mag = 2.0 * A * (625.0e8 / 68719476736.0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    nout = 0;
    last_t = -1;
    while (nout < 40) begin
      @(posedge clk);
      if (bb_valid) begin
        if (last_t >= 0) begin
          checks++;
          if (n - last_t != 2000) failures++;
        end
        last_t = n;
        nout++;
        if (nout > 30) begin
          mag = $sqrt(real'(bb_i) ** 2 + real'(bb_q) ** 2);
          ang = $atan2(real'(bb_q), real'(bb_i));
          checks++;
          if (mag < 0.98 * ref_mag || mag > 1.02 * ref_mag) begin
            failures++;
            $display("magnitude %f expected %f", mag, ref_mag);
          end
        end
      end
    end
    ang1 = ang;
    phi = 1.7;
    nout = 0;
    while (nout < 40) begin
      @(posedge clk);
      if (bb_valid) begin
        nout++;
        ang = $atan2(real'(bb_q), real'(bb_i));
      end
    end
    d = ang - ang1;
    while (d > PI) d -= 2.0 * PI;
    while (d < -PI) d += 2.0 * PI;
    if (d < 0) d = -d;
    checks++;
    if (d < 0.965 || d > 1.035) begin
      failures++;
      $display("angle step %f expected 1.0", d);
    end
    freq = 35.0;
    nout = 0;
    while (nout < 40) begin
      @(posedge clk);
      if (bb_valid) begin
        nout++;
        if (nout > 30) begin
          mag = $sqrt(real'(bb_i) ** 2 + real'(bb_q) ** 2);
          checks++;
          if (mag > 0.02 * ref_mag) begin
            failures++;
            $display("stop-band magnitude %f", mag);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
