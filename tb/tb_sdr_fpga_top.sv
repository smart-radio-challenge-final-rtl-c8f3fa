// tb_sdr_fpga_top: end-to-end self-checking test of the FPGA top level at
// its default sizes (80 MHz clock, 100 ms sensing period, 4 us window,
// CPSCIC x8/x4, CIC 500, 12x16 interleaver). About 8.2 million cycles.
//
// The testbench plays the DSP: it writes R_f through the custom registers,
// streams 16-bit halfwords into the VPSS link and collects tagged words
// from it, while the ADC input carries a carrier exactly at the 30 MHz IF.
// Scenario and checks:
//   R_f=0      51 voice symbols -> 63 coded words (R_d=0) equal to a
//              software RS(63,51) encoder.
//   R_f=1      12 data words -> 12 coded words (R_d=0).
//   R_f=3 rx   those coded words, with 3 bits flipped, -> Viterbi output
//              (R_d=2) equal to the original data: loopback through
//              interleaver, deinterleaver, encoder and decoder.
//   R_f=2 rx   the RS codeword with 5 corrupted symbols -> 51 decoded words
//              (R_d=2) equal to the message, 5 corrections reported.
//   reserved   a word under R_f=3 without the receive flag is dropped.
//   R_f=2      symbols to the upconverter, running across the second
//              sensing window: the DAC is active while transmitting and
//              exactly zero while the sensing timer disables the
//              transmitter.
//   baseband   words with R_d=1 every 2000 cycles, magnitude 2*A*0.9095.
//   sensing    20 words with R_d=3 per window, none outside; magnitude
//              2*A with the reset kernel, A after the testbench loads a
//              half-gain kernel between the two windows.
//   R_d reg    register 1 is seen holding each of the four tags.
// Every mechanism is counted; one that never happened is a failure.
module tb_sdr_fpga_top;
  import sdr_pkg::*;
  import rs_tb_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real A  = 3000.0;
  localparam longint PERIOD = 8_000_000;

  logic clk = 0, rst_n = 0;
  logic creg_we = 0;
  logic [2:0] creg_addr = 3'd1;
  logic [31:0] creg_wdata = '0, creg_rdata;
  logic be_valid = 0, be_ready;
  logic [15:0] be_data = '0;
  logic fe_valid, fe_ready = 1;
  logic [15:0] fe_data;
  logic [1:0] fe_tag;
  logic coef_we = 0;
  logic [1:0] coef_sel = '0;
  logic [6:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic signed [13:0] adc_data = '0;
  logic signed [15:0] dac_data;
  logic tx_enable, sense_active, rs_dec_done, rs_dec_fail, cmd_dropped;
  logic [3:0] rs_dec_corrected;

  sdr_fpga_top dut (.*);

  always #6.25ns clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------------------------------------------------------- ADC
  always @(negedge clk) begin
    adc_data <= 14'($rtoi(A * $cos(2.0 * PI * (30.0 / 80.0) * real'(cyc) + 0.4)));
    cyc <= cyc + 1;
  end

  // ------------------------------------------------- mechanism counters
  int m_tag [4];
  int m_rdreg [4];
  int m_dropped = 0, m_txoff = 0, m_dac_active = 0, m_rs_done = 0;
  int m_sense_windows = 0, m_coef_writes = 0, m_rf [5];
  int last_corr = -1;
  bit last_fail = 0;

  // -------------------------------------------------- link receive side
  logic [31:0] rx_coded[$], rx_dec[$];
  bit have_lo = 0;
  logic [15:0] lo_half;
  int sense_in_window = 0;
  real sense_expect = 2.0 * A;
  int bb_seen = 0;
  longint bb_last = -1;
  real bb_expect = 2.0 * A * (625.0e8 / 68719476736.0);

  always @(posedge clk) if (rst_n) begin
    if (fe_valid && fe_ready) begin
      if (!have_lo) begin
        lo_half = fe_data;
        have_lo = 1;
      end else begin
        logic [31:0] w;
        real mag;
        w = {fe_data, lo_half};
        have_lo = 0;
        m_tag[fe_tag]++;
        case (fe_tag)
          2'd0: rx_coded.push_back(w);
          2'd2: rx_dec.push_back(w);
          2'd1: begin
            bb_seen++;
            mag = $sqrt(real'($signed(w[15:0])) ** 2 + real'($signed(w[31:16])) ** 2);
            if (bb_seen > 20) begin
              check(mag > 0.97 * bb_expect && mag < 1.03 * bb_expect,
                    $sformatf("baseband magnitude %f", mag));
              check(cyc - bb_last > 1990 && cyc - bb_last < 2010,
                    $sformatf("baseband spacing %0d", cyc - bb_last));
            end
            bb_last = cyc;
          end
          default: begin
            sense_in_window++;
            mag = $sqrt(real'($signed(w[15:0])) ** 2 + real'($signed(w[31:16])) ** 2);
            if (sense_in_window > 3 || m_sense_windows > 1)
              check(mag > 0.97 * sense_expect && mag < 1.03 * sense_expect,
                    $sformatf("sensing magnitude %f expected %f", mag, sense_expect));
          end
        endcase
      end
    end
    if (cmd_dropped) m_dropped++;
    if (rs_dec_done) begin
      m_rs_done++;
      last_corr = int'(rs_dec_corrected);
      last_fail = rs_dec_fail;
    end
    if (!creg_we && creg_addr == 3'd1) m_rdreg[creg_rdata[1:0]]++;
  end

  // window bookkeeping: 20 sensing words per window
  always @(posedge clk) begin
    if (rst_n && dut.sense_start) begin
      m_sense_windows++;
      sense_in_window = 0;
    end
  end
  initial begin
    forever begin
      @(negedge sense_active);
      repeat (200) @(posedge clk);
      check(sense_in_window == 20,
            $sformatf("window gave %0d sensing words", sense_in_window));
    end
  end

  // transmitter gating: zero on the DAC one cycle into the window
  logic tx_q = 1;
  always @(posedge clk) if (rst_n) begin
    tx_q <= tx_enable;
    if (!tx_q && !tx_enable) begin
      m_txoff++;
      if (dac_data != 0) begin
        failures++;
        $display("FAIL @%0d: DAC active while transmitter disabled", cyc);
      end
    end
    if (tx_enable && dac_data != 0) m_dac_active++;
  end

  // ----------------------------------------------------- DSP-side tasks
  task automatic wr_reg(input int a, input logic [31:0] d);
    @(negedge clk);
    creg_we = 1;
    creg_addr = 3'(a);
    creg_wdata = d;
    @(negedge clk);
    creg_we = 0;
    creg_addr = 3'd1;
  endtask

  task automatic send_half(input logic [15:0] h);
    @(negedge clk);
    be_valid = 1;
    be_data = h;
    forever begin
      bit acc;
      #1;
      acc = be_valid && be_ready;
      @(posedge clk);
      if (acc) break;
      @(negedge clk);
    end
    @(negedge clk);
    be_valid = 0;
  endtask

  task automatic send_word(input logic [31:0] w);
    send_half(w[15:0]);
    send_half(w[31:16]);
  endtask

  task automatic wait_q(ref logic [31:0] q[$], input int n, input int limit);
    int t;
    t = 0;
    while (q.size() < n && t < limit) begin
      @(posedge clk);
      t++;
    end
  endtask

  // --------------------------------------------------------- scenario
  initial begin
    msg_t msg;
    cw_t cw, bad;
    logic [15:0] data_words [12];
    logic [31:0] coded [12];
    bit ok;
    int nb;

    for (int i = 0; i < 4; i++) begin m_tag[i] = 0; m_rdreg[i] = 0; end
    for (int i = 0; i < 5; i++) m_rf[i] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (20) @(posedge clk);

    // R_f = 0: RS encoding
    wr_reg(CREG_RF, 32'd0);
    for (int i = 0; i < 51; i++) msg[i] = $urandom_range(0, 63);
    cw = encode(msg);
    rx_coded.delete();
    for (int i = 0; i < 51; i++) send_word(32'(msg[i]));
    wait_q(rx_coded, 63, 5000);
    check(rx_coded.size() == 63, $sformatf("RS encoder gave %0d words", rx_coded.size()));
    ok = 1;
    for (int i = 0; i < 63 && i < rx_coded.size(); i++)
      if (rx_coded[i] != 32'(cw[i])) ok = 0;
    check(ok, "RS codeword mismatch");
    if (ok) m_rf[0]++;

    // R_f = 1: convolutional encoding and interleaving
    wr_reg(CREG_RF, 32'd1);
    rx_coded.delete();
    for (int i = 0; i < 12; i++) begin
      data_words[i] = 16'($urandom);
      send_word({16'd0, data_words[i]});
    end
    wait_q(rx_coded, 12, 10000);
    check(rx_coded.size() == 12, $sformatf("encoder gave %0d words", rx_coded.size()));
    for (int i = 0; i < 12; i++) coded[i] = rx_coded[i];
    if (rx_coded.size() == 12) m_rf[1]++;

    // R_f = 3 (rx): deinterleaving and Viterbi decoding, 3 channel errors
    wr_reg(CREG_RF, 32'(3 | (1 << RF_RX_BIT)));
    rx_dec.delete();
    coded[1][5]   = ~coded[1][5];
    coded[5][20]  = ~coded[5][20];
    coded[9][11]  = ~coded[9][11];
    for (int i = 0; i < 12; i++) send_word(coded[i]);
    wait_q(rx_dec, 9, 10000);
    // 192 bits in, the decoder holds back its 42-bit traceback: 9 words
    check(rx_dec.size() == 9, $sformatf("Viterbi gave %0d words", rx_dec.size()));
    ok = 1;
    for (int i = 0; i < 9 && i < rx_dec.size(); i++)
      if (rx_dec[i] != {16'd0, data_words[i]}) ok = 0;
    check(ok, "Viterbi loopback mismatch");
    if (ok) m_rf[4]++;

    // R_f = 2 (rx): RS decoding with 5 symbol errors
    wr_reg(CREG_RF, 32'(2 | (1 << RF_RX_BIT)));
    rx_dec.delete();
    bad = cw;
    bad[3] ^= 1; bad[17] ^= 33; bad[30] ^= 7; bad[50] ^= 63; bad[60] ^= 12;
    for (int i = 0; i < 63; i++) send_word(32'(bad[i]));
    wait_q(rx_dec, 51, 5000);
    repeat (40) @(posedge clk);
    check(rx_dec.size() == 51, $sformatf("RS decoder gave %0d words", rx_dec.size()));
    ok = 1;
    for (int i = 0; i < 51 && i < rx_dec.size(); i++)
      if (rx_dec[i] != 32'(msg[i])) ok = 0;
    check(ok, "RS decoded message mismatch");
    check(last_corr == 5 && !last_fail,
          $sformatf("RS decoder reports %0d corrections", last_corr));
    if (ok) m_rf[3]++;

    // reserved command: R_f = 3 without the receive flag
    wr_reg(CREG_RF, 32'd3);
    send_word(32'hdead_beef);
    repeat (10) @(posedge clk);

    // load a half-gain sensing kernel between the two windows
    repeat (5000) @(posedge clk);
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      coef_we = 1;
      coef_sel = 2'd2;
      coef_addr = 7'(k);
      coef_data = (k < 16) ? 16'sd512 : 16'sd0;
      @(posedge clk) m_coef_writes++;
    end
    @(negedge clk) coef_we = 0;
    sense_expect = A;

    // R_f = 2: transmit symbols across the second sensing window
    wr_reg(CREG_RF, 32'd2);
    while (cyc < PERIOD - 60000) @(posedge clk);
    for (int s = 0; s < 40; s++) begin
      logic signed [15:0] si, sq;
      si = (s % 2) ? 16'sd8000 : -16'sd8000;
      sq = (s % 3) ? 16'sd6000 : -16'sd6000;
      send_word({sq, si});
    end
    m_rf[2]++;
    while (cyc < PERIOD + 120000) @(posedge clk);

    // mechanism summary
    nb = 0;
    for (int i = 0; i < 4; i++) begin
      $display("words with R_d=%0d: %0d, R_d register seen as %0d: %0d cycles",
               i, m_tag[i], i, m_rdreg[i]);
      check(m_tag[i] > 0, $sformatf("no word with R_d=%0d", i));
      check(m_rdreg[i] > 0, $sformatf("R_d register never %0d", i));
    end
    $display("R_f services: enc %0d conv %0d duc %0d rsdec %0d vit %0d",
             m_rf[0], m_rf[1], m_rf[2], m_rf[3], m_rf[4]);
    for (int i = 0; i < 5; i++) check(m_rf[i] > 0, $sformatf("R_f service %0d never ran", i));
    $display("sensing windows %0d, tx-off cycles %0d, DAC active cycles %0d",
             m_sense_windows, m_txoff, m_dac_active);
    check(m_sense_windows == 2, "expected two sensing windows");
    check(m_txoff >= 2 * 318, "transmitter was not disabled by sensing");
    check(m_dac_active > 100000, "DAC never transmitted");
    check(m_dropped > 0, "reserved command never dropped a word");
    check(m_rs_done > 0, "RS decoder never finished a codeword");
    check(m_coef_writes == 64, "coefficient load incomplete");
    check(m_tag[3] == 40, $sformatf("%0d sensing words", m_tag[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(12_000_000 * 12.5ns);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
