// tb_custom_regs: self-checking test of the eight shared custom registers.
// Checks reset values (tuning words at the 30 MHz IF), DSP writes and
// read-back against a model array kept here, that the DSP cannot overwrite
// R_d while the FPGA can, and that rf_changed pulses only when R_f is
// written with a different value.
module tb_custom_regs;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dsp_we = 0, rd_we = 0;
  logic [2:0] dsp_addr = '0;
  logic [31:0] dsp_wdata = '0, dsp_rdata, rd_wdata = '0;
  logic [31:0] regs [NUM_CREGS];
  logic rf_changed;
  int checks = 0, failures = 0;

  custom_regs dut (.*);

  always #5 clk = ~clk;

  logic [31:0] model [8];

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 8; i++) model[i] = (i >= 2 && i <= 4) ? 32'h6000_0000 : '0;
    for (int i = 0; i < 8; i++) begin
      dsp_addr = 3'(i);
      #1;
      checks++;
      if (dsp_rdata != model[i]) failures++;
    end
    for (int n = 0; n < 200; n++) begin
      logic [31:0] old_rf;
      bit expect_pulse;
      @(negedge clk);
      old_rf = model[0];
      dsp_we = ($urandom_range(0, 1) == 1);
      dsp_addr = 3'($urandom_range(0, 7));
      dsp_wdata = ($urandom_range(0, 3) == 0) ? model[dsp_addr] : $urandom;
      rd_we = ($urandom_range(0, 3) == 0);
      rd_wdata = $urandom;
      expect_pulse = dsp_we && dsp_addr == 0 && dsp_wdata != old_rf;
      if (dsp_we && dsp_addr != 1) model[dsp_addr] = dsp_wdata;
      if (rd_we) model[1] = rd_wdata;
      @(posedge clk) #1;
      checks++;
      if (rf_changed != expect_pulse) failures++;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (regs[i] != model[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
