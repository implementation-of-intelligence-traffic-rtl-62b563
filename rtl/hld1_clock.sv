// hld1_clock: timing enables of the two-way traffic light controller.
//
// The controller runs from one 1 kHz system clock. This block divides it
// into the three enables the rest of the controller works from:
//   ena_scan  - one cycle in every SCAN_DIV clocks (the scan rate),
//   ena_1hz   - one cycle once per second; it is produced by counting
//               ena_scan pulses, so it always falls on an ena_scan cycle,
//   flash_1hz - a 1 Hz square wave, high for the first half of each second.
// All three are decoded from registered counters (no derived clocks).
// Reset is synchronous and active high; after reset the first ena_1hz
// comes CLK_HZ cycles later.
//
// The 1 kHz input and the three output names follow the original design;
// the scan rate (every clock by default) and the flash phase are choices
// of this implementation.
module hld1_clock #(
  parameter int unsigned CLK_HZ   = 1000,  // system clock frequency
  parameter int unsigned SCAN_DIV = 1      // clocks per ena_scan pulse
) (
  input  logic clk,
  input  logic reset,
  output logic ena_scan,
  output logic ena_1hz,
  output logic flash_1hz
);

  localparam int unsigned TICKS = CLK_HZ / SCAN_DIV;  // scan ticks per second
  localparam int unsigned SW    = (SCAN_DIV > 1) ? $clog2(SCAN_DIV) : 1;
  localparam int unsigned TW    = (TICKS > 1) ? $clog2(TICKS) : 1;

  logic [SW-1:0] scan_cnt;
  logic [TW-1:0] tick_cnt;

  assign ena_scan  = (scan_cnt == SW'(SCAN_DIV - 1));
  assign ena_1hz   = ena_scan && (tick_cnt == TW'(TICKS - 1));
  assign flash_1hz = (tick_cnt < TW'(TICKS / 2));

  always_ff @(posedge clk) begin
    if (reset) begin
      scan_cnt <= '0;
      tick_cnt <= '0;
    end else begin
      scan_cnt <= ena_scan ? '0 : scan_cnt + 1'b1;
      if (ena_scan)
        tick_cnt <= ena_1hz ? '0 : tick_cnt + 1'b1;
    end
  end

endmodule
