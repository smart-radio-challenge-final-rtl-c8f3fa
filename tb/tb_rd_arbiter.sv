// tb_rd_arbiter: self-checking test of the return-link arbiter.
// Six sources hold numbered words (source in bits 31:28, sequence number
// below) and offer them at random; the link takes words at random.
// Checks: every word arrives once and in order per source, with its
// source's R_d tag; when the link is free the highest-priority waiting
// source (lowest index) wins; a word waiting for the link stays offered.
module tb_rd_arbiter;
  import sdr_pkg::*;
  localparam int NSRC = 6, PER = 60;
  localparam logic [1:0] TAGS [NSRC] = '{RD_SENSE, RD_BASEBAND, RD_DECODED,
                                        RD_DECODED, RD_CODED, RD_CODED};
  logic clk = 0, rst_n = 0;
  logic [NSRC-1:0] in_valid = '0, in_ready;
  logic [31:0] in_data [NSRC];
  logic out_valid, out_ready = 0;
  logic [31:0] out_data;
  logic [1:0] out_tag;
  int checks = 0, failures = 0;

  rd_arbiter dut (.*);

  always #5 clk = ~clk;

  int next_seq [NSRC];
  int recv_seq [NSRC];

  initial begin
    bit waiting_prev;
    int total;
    waiting_prev = 0;
    total = 0;
    for (int s = 0; s < NSRC; s++) begin
      next_seq[s] = 0;
      recv_seq[s] = 0;
      in_data[s] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (total < NSRC * PER) begin
      bit [NSRC-1:0] acc;
      @(negedge clk);
      for (int s = 0; s < NSRC; s++) begin
        if (!in_valid[s] && next_seq[s] < PER && $urandom_range(0, 3) == 0) begin
          in_valid[s] = 1;
          in_data[s]  = {4'(s), 28'(next_seq[s])};
        end
      end
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      // priority: with nothing held over, the lowest waiting index wins
      if (!waiting_prev && in_valid != 0) begin
        int want;
        want = -1;
        for (int s = NSRC - 1; s >= 0; s--) if (in_valid[s]) want = s;
        checks++;
        if (int'(out_data[31:28]) != want) failures++;
      end
      if (out_valid) begin
        int s;
        s = int'(out_data[31:28]);
        checks++;
        if (s >= NSRC || out_tag != TAGS[s]) failures++;
      end
      acc = in_valid & in_ready;
      @(posedge clk);
      waiting_prev = out_valid && !out_ready;
      if (out_valid && out_ready) begin
        int s;
        s = int'(out_data[31:28]);
        checks += 2;
        if ($countones(acc) != 1 || !acc[s]) failures++;
        if (s < NSRC && int'(out_data[27:0]) != recv_seq[s]) failures++;
        if (s < NSRC) recv_seq[s]++;
        total++;
      end
      @(negedge clk);
      for (int s = 0; s < NSRC; s++) if (acc[s]) begin
        in_valid[s] = 0;
        next_seq[s]++;
      end
      @(posedge clk);
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
