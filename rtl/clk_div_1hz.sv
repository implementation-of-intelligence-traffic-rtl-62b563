// clk_div_1hz: 1 Hz enable from the board clock.
//
// A counter runs 0 .. CLK_HZ-1 on every clock and wraps; clk_1hz is high
// for the one cycle in which the counter holds CLK_HZ-1, so it is a
// one-cycle enable once per second (with the 50 MHz board clock, once every
// 50,000,000 cycles). There is no reset: the counter powers up at 0, so the
// first pulse comes in cycle CLK_HZ-1 after start-up (the power-up value on
// the declaration takes the place of a reset, as on an FPGA; Verilator's
// lint notes such initial values). clk_1hz is meant as a
// clock enable for logic on the same clock, not as a clock.
//
// This follows the original design's clock process; the wrap at the end of
// the range is this implementation's reading of it.
module clk_div_1hz #(
  parameter int unsigned CLK_HZ = 50_000_000   // board clock frequency
) (
  input  logic clk,
  output logic clk_1hz
);

  localparam int unsigned W = (CLK_HZ > 1) ? $clog2(CLK_HZ) : 1;

  logic [W-1:0] clk_cnt = '0;

  assign clk_1hz = (clk_cnt == W'(CLK_HZ - 1));

  always_ff @(posedge clk)
    clk_cnt <= clk_1hz ? '0 : clk_cnt + 1'b1;

endmodule
