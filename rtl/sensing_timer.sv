// sensing_timer: opens the periodic spectrum-sensing window and holds the
// transmitter off while it is open.
//
// The modem senses the channel 10 times a second: every 100 ms a timer
// starts the sensing path "for almost 4 us" and disables the transmitter
// meanwhile. At the 80 MHz clock that is PERIOD = 8,000,000 and
// ACTIVE = 320 cycles. The window opens in the first cycle after reset and
// then every PERIOD cycles (this design's choice).
//
// Interface: sense_active is high for ACTIVE cycles of every PERIOD;
// sense_start pulses in the window's first cycle; tx_enable is the inverse
// of sense_active. `enable` low holds the counter and keeps the window shut.
module sensing_timer #(
  parameter int unsigned PERIOD = 8_000_000,  // 100 ms at 80 MHz
  parameter int unsigned ACTIVE = 320         // 4 us at 80 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic sense_active,
  output logic sense_start,
  output logic tx_enable
);

  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (enable) cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
  end

  assign sense_active = enable && (cnt < CW'(ACTIVE));
  assign sense_start  = enable && (cnt == '0);
  assign tx_enable    = !sense_active;

  // the window must be shorter than the period
  initial assert (ACTIVE < PERIOD) else $error("ACTIVE must be below PERIOD");

endmodule
