// tb_nco: self-checking test of the CORDIC-based NCO.
// For two tuning words (the 30 MHz IF at 80 MHz and an arbitrary one) the
// phase is tracked here and cos/sin are compared with $cos/$sin of the
// phase ITER+2 enabled cycles earlier, allowing 8 LSB of error. Enable is
// dropped at random to check that the oscillator and pipeline hold.
module tb_nco;
  localparam int ITER = 16, LAT = ITER + 2;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] tuning_word = 32'h6000_0000;
  logic signed [15:0] cos_out, sin_out;
  int checks = 0, failures = 0, maxerr = 0;

  nco #(.ITER(ITER), .OW(16)) dut (.*);

  always #5 clk = ~clk;

  longint unsigned ph_hist[$];

  initial begin
    longint unsigned ph;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      @(negedge clk);
      if (t == 1) tuning_word = 32'h1234_5679;
      ph = 0;
      rst_n = 0;
      @(negedge clk) rst_n = 1;
      ph_hist.delete();
      for (int n = 0; n < 3000; n++) begin
        @(negedge clk);
        en = ($urandom_range(0, 5) != 0);
        if (en) begin
          ph_hist.push_back(ph);
          ph = (ph + tuning_word) & 64'hFFFF_FFFF;
        end
        @(posedge clk);
        #1;
        if (en && ph_hist.size() > LAT) begin
          real a;
          int ec, es;
          a  = 2.0 * 3.14159265358979 * real'(ph_hist[ph_hist.size() - 1 - (LAT - 1)]) / 4294967296.0;
          ec = int'(cos_out) - int'($rtoi($floor(32767.0 * $cos(a) + 0.5)));
          es = int'(sin_out) - int'($rtoi($floor(32767.0 * $sin(a) + 0.5)));
          if (ec < 0) ec = -ec;
          if (es < 0) es = -es;
          if (ec > maxerr) maxerr = ec;
          if (es > maxerr) maxerr = es;
          checks++;
          if (ec > 8 || es > 8) failures++;
        end
      end
    end
    $display("max error %0d LSB", maxerr);
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
