// tb_sensing_timer: self-checking test of the sensing timer at its default
// size (100 ms period, 4 us window at 80 MHz) over a little more than two
// periods. Checks: window length 320 cycles, window starts 8,000,000 cycles
// apart, sense_start only in a window's first cycle, tx_enable low exactly
// while the window is open, and nothing happens while `enable` is low.
module tb_sensing_timer;
  logic clk = 0, rst_n = 0, enable = 0;
  logic sense_active, sense_start, tx_enable;
  int checks = 0, failures = 0;

  sensing_timer dut (.*);

  always #5 clk = ~clk;

  initial begin
    int starts[$];
    int act_len = 0, cyc = 0, bad = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // held off while disabled
    repeat (50) begin
      @(posedge clk) #1;
      if (sense_active || sense_start || !tx_enable) bad++;
    end
    @(negedge clk) enable = 1;
    while (cyc < 16_000_500) begin
      #1;
      if (sense_start) begin
        starts.push_back(cyc);
        if (!sense_active) bad++;
      end
      if (tx_enable == sense_active) bad++;
      if (sense_active) act_len++;
      else if (act_len != 0) begin
        checks++;
        if (act_len != 320) begin
          failures++;
          $display("window of %0d cycles", act_len);
        end
        act_len = 0;
      end
      @(posedge clk);
      cyc++;
    end
    checks += 4;
    if (bad != 0) failures++;
    if (starts.size() != 3) failures++;
    if (starts.size() >= 2 && starts[1] - starts[0] != 8_000_000) failures++;
    if (starts.size() >= 3 && starts[2] - starts[1] != 8_000_000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16_100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
