// tb_sense_frontend: self-checking test of the sensing front end at its
// default sizes (decimation 16 to 5 MS/s, 64-tap reset kernel = 16-sample
// average). A tone at IF + 0.5 MHz drives the ADC input and the TB opens
// 320-cycle sensing windows (the 4 us sensing time).
// Checks: exactly 20 samples per window and none outside it; every sample
// has magnitude 2*A*0.9836 (mixer scale x sinc droop of the average) within
// 4 % (the reset kernel lets a small image ripple through); consecutive samples rotate by 36 degrees (0.5 MHz at 5 MS/s).
module tb_sense_frontend;
  localparam real PI = 3.14159265358979;
  localparam real A  = 3000.0;
  logic clk = 0, rst_n = 0;
  logic [31:0] tuning_word = 32'h6000_0000;
  logic sense_active = 0, sense_start = 0;
  logic coef_we = 0;
  logic [5:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic signed [13:0] adc_in = '0;
  logic s_valid;
  logic signed [15:0] s_i, s_q;
  int checks = 0, failures = 0;
  longint n = 0;
  int win_count = 0, outside = 0;
  real prev_ph;
  bit have_prev = 0;

  sense_frontend dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    adc_in <= 14'($rtoi(A * $cos(2.0 * PI * (30.5 / 80.0) * real'(n))));
    n <= n + 1;
  end

  // sample checker
  always @(posedge clk) if (rst_n && s_valid) begin
    real mag, ph, d;
    mag = $sqrt(real'(s_i) * real'(s_i) + real'(s_q) * real'(s_q));
    ph = $atan2(real'(s_q), real'(s_i));
    win_count++;
    checks++;
    if (mag < 0.96 * 2.0 * A * 0.9836 || mag > 1.04 * 2.0 * A * 0.9836) begin
      failures++;
      $display("magnitude %f", mag);
    end
    if (have_prev) begin
      d = ph - prev_ph;
      while (d > PI) d -= 2.0 * PI;
      while (d < -PI) d += 2.0 * PI;
      if (d < 0) d = -d;
      checks++;
      if (d < (34.0 * PI / 180.0) || d > (38.0 * PI / 180.0)) begin
        failures++;
        $display("phase step %f deg", d * 180.0 / PI);
      end
    end
    prev_ph = ph;
    have_prev = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (50) @(posedge clk);
    for (int w = 0; w < 5; w++) begin
      @(negedge clk) begin sense_active = 1; sense_start = 1; end
      win_count = 0;
      have_prev = 0;
      @(negedge clk) sense_start = 0;
      repeat (319) @(negedge clk);
      sense_active = 0;
      repeat (40) @(posedge clk);
      checks++;
      if (win_count != 20) begin
        failures++;
        $display("window %0d gave %0d samples", w, win_count);
      end
      win_count = 0;
      repeat (500) @(posedge clk);
      checks++;
      if (win_count != 0) failures++;
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
