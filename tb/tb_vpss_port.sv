// tb_vpss_port: self-checking test of the VPSS link port.
// VPBE: random 16-bit halfwords from the DSP side must come out as 32-bit
// words, low half first, in order, under random back-pressure. VPFE:
// random tagged 32-bit words must leave as two halfwords, low half first,
// each carrying the word's tag, under random DSP readiness; with the DSP
// always ready a word takes two cycles.
module tb_vpss_port;
  logic clk = 0, rst_n = 0, clear = 0;
  logic be_valid = 0, be_ready;
  logic [15:0] be_data = '0;
  logic word_in_valid, word_in_ready = 0;
  logic [31:0] word_in_data;
  logic word_out_valid = 0, word_out_ready;
  logic [31:0] word_out_data = '0;
  logic [1:0] word_out_tag = '0;
  logic fe_valid, fe_ready = 0;
  logic [15:0] fe_data;
  logic [1:0] fe_tag;
  int checks = 0, failures = 0;

  vpss_port dut (.*);

  always #5 clk = ~clk;

  logic [15:0] halves[$], fe_got[$];
  logic [1:0]  fe_tags[$];
  logic [31:0] words_in[$], words_out[$];
  logic [1:0]  tags_out[$];

  initial begin
    bit bacc, wacc, oacc, facc;
    int cyc_fast;
    bacc = 0; oacc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (bacc) be_valid = 0;
      if (oacc) word_out_valid = 0;
      if (!be_valid && halves.size() < 400 && $urandom_range(0, 1)) begin
        be_valid = 1;
        be_data  = 16'($urandom);
      end
      if (!word_out_valid && words_out.size() < 200 && $urandom_range(0, 1)) begin
        word_out_valid = 1;
        word_out_data  = $urandom;
        word_out_tag   = 2'($urandom);
      end
      word_in_ready = ($urandom_range(0, 2) != 0);
      fe_ready = (n >= 2500) || ($urandom_range(0, 2) != 0);
      #1;
      bacc = be_valid && be_ready;
      wacc = word_in_valid && word_in_ready;
      oacc = word_out_valid && word_out_ready;
      facc = fe_valid && fe_ready;
      @(posedge clk);
      if (bacc) halves.push_back(be_data);
      if (wacc) words_in.push_back(word_in_data);
      if (oacc) begin
        words_out.push_back(word_out_data);
        tags_out.push_back(word_out_tag);
      end
      if (facc) begin
        fe_got.push_back(fe_data);
        fe_tags.push_back(fe_tag);
      end
    end
    checks += 2;
    if (words_in.size() != halves.size() / 2) failures++;
    if (fe_got.size() != 2 * words_out.size()) failures++;
    foreach (words_in[i]) begin
      checks++;
      if (words_in[i] != {halves[2*i+1], halves[2*i]}) failures++;
    end
    foreach (words_out[i]) begin
      checks += 2;
      if (fe_got[2*i] != words_out[i][15:0] || fe_got[2*i+1] != words_out[i][31:16]) failures++;
      if (fe_tags[2*i] != tags_out[i] || fe_tags[2*i+1] != tags_out[i]) failures++;
    end
    // rate: one word per two cycles with the DSP always ready
    @(negedge clk);
    fe_ready = 1;
    word_out_valid = 1;
    cyc_fast = 0;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      #0;
    end
    checks++;
    cyc_fast = 0;
    word_out_valid = 1;
    for (int k = 0; k < 20; k++) begin
      #1;
      if (word_out_ready) cyc_fast++;
      @(negedge clk);
    end
    if (cyc_fast != 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
