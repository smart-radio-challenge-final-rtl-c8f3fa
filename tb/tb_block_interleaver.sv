// tb_block_interleaver: self-checking test of the row-column interleaver.
// A 12 x 16 interleaver feeds a 16 x 12 instance (the deinterleaver).
// Checks: the interleaver's output order equals the column-by-column read
// of the row-by-row written block (worked out here from the input list),
// the deinterleaver restores the original order, and a block's first bit
// is offered one cycle after its last bit was written.
// Stimulus changes on the falling edge; transfers are decided from the
// values seen just before the rising edge; random back-pressure throughout.
module tb_block_interleaver;
  localparam int ROWS = 12, COLS = 16, N = ROWS * COLS, BLOCKS = 5;
  logic clk = 0, rst_n = 0, clear = 0;
  logic a_valid = 0, a_ready, a_bit = 0;
  logic b_valid, b_ready, b_bit;
  logic c_valid, c_ready = 0, c_bit;
  int checks = 0, failures = 0, cycle = 0;

  block_interleaver #(.ROWS(ROWS), .COLS(COLS)) il (
    .clk, .rst_n, .clear, .in_valid(a_valid), .in_ready(a_ready), .in_bit(a_bit),
    .out_valid(b_valid), .out_ready(b_ready), .out_bit(b_bit));
  block_interleaver #(.ROWS(COLS), .COLS(ROWS)) dil (
    .clk, .rst_n, .clear, .in_valid(b_valid), .in_ready(b_ready), .in_bit(b_bit),
    .out_valid(c_valid), .out_ready(c_ready), .out_bit(c_bit));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  bit sent[$], mid[$], fin[$];
  int last_write_cycle = -1, first_read_cycle = -1;

  initial begin
    bit acc = 0, bacc, cacc;
    int taken = 0, idle = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (taken < N * BLOCKS || idle < 600) begin
      @(negedge clk);
      if (acc) a_valid = 0;
      c_ready = ($urandom_range(0, 4) != 0);
      if (!a_valid && taken < N * BLOCKS && $urandom_range(0, 3) != 0) begin
        a_valid = 1;
        a_bit   = 1'($urandom_range(0, 1));
      end
      #1;
      acc  = a_valid && a_ready;
      bacc = b_valid && b_ready;
      cacc = c_valid && c_ready;
      @(posedge clk);
      if (acc) begin
        sent.push_back(a_bit);
        taken++;
        if (taken == N) last_write_cycle = cycle;
      end
      if (bacc) begin
        mid.push_back(b_bit);
        if (mid.size() == 1) first_read_cycle = cycle;
      end
      if (cacc) fin.push_back(c_bit);
      if (taken == N * BLOCKS) idle++;
    end
    // interleaver order
    checks++;
    if (mid.size() != N * BLOCKS) begin
      failures++;
      $display("interleaver passed %0d bits, expected %0d", mid.size(), N * BLOCKS);
    end
    for (int k = 0; k < mid.size(); k++) begin
      int blk, o, col, row;
      blk = k / N;
      o   = k % N;
      col = o / ROWS;
      row = o % ROWS;
      checks++;
      if (mid[k] != sent[blk * N + row * COLS + col]) failures++;
    end
    // deinterleaver restores the order
    checks++;
    if (fin.size() != N * BLOCKS) begin
      failures++;
      $display("deinterleaver passed %0d bits", fin.size());
    end
    for (int k = 0; k < fin.size(); k++) begin
      checks++;
      if (fin[k] != sent[k]) failures++;
    end
    // latency: first bit out one cycle after the block's last bit went in
    checks++;
    if (first_read_cycle - last_write_cycle != 1) begin
      failures++;
      $display("latency %0d", first_read_cycle - last_write_cycle);
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
