// hld3_countdown: seconds countdown and its display for the two-way
// controller.
//
// A new state starts when hld4 drops recount: the block then loads
// cnt_ff = load - 1 (the load has been captured by hld2 while recount was
// high). cnt_ff steps down by one on every ena_1hz tick and stops at 0.
// next_state is high while cnt_ff is 0 and no reload is pending; the signal
// controller advances on the tick that sees it, so a state of N seconds
// lasts exactly N seconds (cnt_ff shows N-1 ... 0).
//
// Display: the remaining time is cnt_ff + 1 seconds. 'led' is a bar of
// LED_W lamps with one lamp lit per remaining second (1 lights a lamp,
// 0 puts it out), so the bar empties as the state runs out; 'bcd' gives
// the same number as two BCD digits {tens, ones}. Both are look-ups of
// cnt_ff and are combinational.
//
// The count-from-load-minus-one scheme, the look-up and the 25-bit LED
// output follow the original design; the bar coding of the 25 LEDs, the
// BCD port and the reload handshake are choices of this implementation.
module hld3_countdown
  import tlc_pkg::*;
#(
  parameter int unsigned LED_W = 25,     // lamps in the countdown bar
  parameter int unsigned CNT_W = SEC_W   // width of the count
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             ena_1hz,
  input  logic             recount,
  input  logic [CNT_W-1:0] load,
  output logic             next_state,
  output logic [CNT_W-1:0] cnt_ff,
  output logic [LED_W-1:0] led,
  output logic [7:0]       bcd
);

  logic recount_q;
  logic reload;

  assign reload = recount_q && !recount;

  always_ff @(posedge clk) begin
    if (reset) begin
      recount_q <= 1'b0;
      cnt_ff    <= '0;
    end else begin
      recount_q <= recount;
      if (reload)
        cnt_ff <= load - 1'b1;
      else if (ena_1hz && cnt_ff != '0)
        cnt_ff <= cnt_ff - 1'b1;
    end
  end

  assign next_state = (cnt_ff == '0) && !recount && !recount_q;

  // Remaining seconds, one more than the count.
  logic [CNT_W:0] remaining;
  assign remaining = {1'b0, cnt_ff} + 1'b1;

  always_comb begin
    for (int unsigned k = 0; k < LED_W; k++)
      led[k] = (k < remaining);
  end

  assign bcd = {4'(remaining / 10), 4'(remaining % 10)};

endmodule
