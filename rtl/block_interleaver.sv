// block_interleaver: row-column block interleaver for coded data bits.
//
// Bits are written into a ROWS x COLS array row by row and read out column
// by column. The same module deinterleaves when instantiated with ROWS and
// COLS swapped. The modem description asks for "a simple row-column block
// interleaver" and gives no size; 12 x 16 = 192 coded bits (64 8-PSK
// symbols, one preamble cycle's worth) is this design's choice.
//
// Two banks are used in ping-pong fashion so one block can be written while
// the previous one is read. A bank is read only once it is full.
// Interface: bit-serial valid/ready streams on both sides; `clear` drops any
// partly written block and empties both banks.
// Timing: the first bit of a block leaves one cycle after the block's last
// bit was written (or later if the reader stalls); throughput one bit per
// cycle on each side.
module block_interleaver #(
  parameter int unsigned ROWS = 12,
  parameter int unsigned COLS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit
);

  localparam int unsigned DEPTH = ROWS * COLS;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned RW    = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CW    = (COLS > 1) ? $clog2(COLS) : 1;

  logic [DEPTH-1:0] mem [2];
  logic [1:0]       full;          // bank holds a complete block
  logic             wbank, rbank;
  logic [AW-1:0]    waddr;
  logic [RW-1:0]    rrow;
  logic [CW-1:0]    rcol;
  logic [AW-1:0]    raddr;

  assign raddr     = AW'(rrow) * AW'(COLS) + AW'(rcol);
  assign in_ready  = !full[wbank];
  assign out_valid = full[rbank];
  assign out_bit   = mem[rbank][raddr];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wbank][waddr] <= in_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '0;
      wbank <= 1'b0;
      rbank <= 1'b0;
      waddr <= '0;
      rrow  <= '0;
      rcol  <= '0;
    end else if (clear) begin
      full  <= '0;
      wbank <= 1'b0;
      rbank <= 1'b0;
      waddr <= '0;
      rrow  <= '0;
      rcol  <= '0;
    end else begin
      // write side: row-major order
      if (in_valid && in_ready) begin
        if (waddr == AW'(DEPTH - 1)) begin
          waddr       <= '0;
          full[wbank] <= 1'b1;
          wbank       <= !wbank;
        end else begin
          waddr <= waddr + 1'b1;
        end
      end
      // read side: column-major order
      if (out_valid && out_ready) begin
        if (rrow == RW'(ROWS - 1)) begin
          rrow <= '0;
          if (rcol == CW'(COLS - 1)) begin
            rcol        <= '0;
            full[rbank] <= 1'b0;
            rbank       <= !rbank;
          end else begin
            rcol <= rcol + 1'b1;
          end
        end else begin
          rrow <= rrow + 1'b1;
        end
      end
    end
  end

endmodule
