// tb_viterbi_decoder: self-checking test of the K=7 Viterbi decoder.
// Random information bits are encoded here (generator tap lists
// {0,3,4,5,6} and {0,1,3,4,6}), isolated channel errors are added (one
// flipped coded bit every 23), the coded stream is fed bit-serially with
// random gaps and back-pressure, and the decoded bits must equal the
// information bits. A tail of zero bits flushes the survivor memory. The
// first decoded bit must appear right after pair TB_DEPTH + 1 is accepted.
module tb_viterbi_decoder;
  localparam int NINFO = 600, TAIL = 60, DEPTH = 42;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready, in_bit = 0;
  logic out_valid, out_ready = 0, out_bit;
  int checks = 0, failures = 0, cycle = 0;

  viterbi_decoder #(.TB_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  bit info[$], coded[$], got[$];

  initial begin
    bit acc = 0, oacc;
    int taken = 0, idle = 0, nflip = 0;
    int pairs_at_first_out = -1;
    bit hist[7];
    // build the stimulus
    for (int i = 0; i < NINFO + TAIL; i++) begin
      bit u, c0, c1;
      u = (i < NINFO) ? 1'($urandom_range(0, 1)) : 1'b0;
      info.push_back(u);
      for (int k = 6; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = u;
      c0 = hist[0] ^ hist[3] ^ hist[4] ^ hist[5] ^ hist[6];
      c1 = hist[0] ^ hist[1] ^ hist[3] ^ hist[4] ^ hist[6];
      coded.push_back(c0);
      coded.push_back(c1);
    end
    for (int i = 11; i < coded.size(); i += 23) begin
      coded[i] = !coded[i];
      nflip++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (taken < coded.size() || idle < 20) begin
      @(negedge clk);
      if (acc) in_valid = 0;
      out_ready = ($urandom_range(0, 4) != 0);
      if (!in_valid && taken < coded.size() && $urandom_range(0, 3) != 0) begin
        in_valid = 1;
        in_bit   = coded[taken];
      end
      #1;
      acc  = in_valid && in_ready;
      oacc = out_valid && out_ready;
      @(posedge clk);
      if (acc) taken++;
      if (oacc) got.push_back(out_bit);
      if (out_valid && pairs_at_first_out < 0) pairs_at_first_out = taken / 2;
      if (taken == coded.size()) idle++;
    end
    // every information bit decoded correctly despite the flipped bits
    checks++;
    if (got.size() != NINFO + TAIL - DEPTH) begin
      failures++;
      $display("decoded %0d bits, expected %0d", got.size(), NINFO + TAIL - DEPTH);
    end
    for (int i = 0; i < NINFO && i < got.size(); i++) begin
      checks++;
      if (got[i] != info[i]) failures++;
    end
    // latency in pairs
    checks++;
    if (pairs_at_first_out != DEPTH + 1) begin
      failures++;
      $display("first output after %0d pairs", pairs_at_first_out);
    end
    $display("flipped %0d coded bits", nflip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
