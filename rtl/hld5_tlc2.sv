// hld5_tlc2: two-way (north-south / east-west) traffic light controller
// with countdown display and automatic / manual mode.
//
// Structure (one 1 kHz clock, active-high synchronous reset):
//   hld1_clock          makes ena_scan, ena_1hz and flash_1hz;
//   hld4_signal_control holds the signal state and drives the lamps;
//   hld2_count_select   gives the new state's duration in seconds;
//   hld3_countdown      counts it down and drives the LED bar and BCD value.
// A state change in hld4 raises recount; hld2 captures the duration, hld3
// reloads its count when recount falls and tells hld4 through next_state
// when the time is up. In automatic mode the cycle is north-south green
// 25 s, north-south yellow 5 s, east-west green 15 s, east-west yellow 5 s
// (50 s); in manual mode st_butt steps the states and the countdown restarts
// at every step.
//
// This connection of the four circuits is the original design's; one
// countdown display output serves both roads.
module hld5_tlc2
  import tlc_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 1000,
  parameter int unsigned SCAN_DIV    = 1,
  parameter int unsigned NS_GREEN_S  = 25,
  parameter int unsigned NS_YELLOW_S = 5,
  parameter int unsigned EW_GREEN_S  = 15,
  parameter int unsigned EW_YELLOW_S = 5
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             a_m,
  input  logic             st_butt,
  output logic [1:0]       red,
  output logic [1:0]       green,
  output logic [1:0]       yellow,
  output sign_state_t      sign_state,
  output logic             next_state,
  output logic             recount,
  output logic [SEC_W-1:0] cnt_ff,
  output logic [24:0]      led,
  output logic [7:0]       bcd,
  output logic             flash_1hz
);

  logic             ena_scan, ena_1hz;
  logic [SEC_W-1:0] load;

  hld1_clock #(.CLK_HZ(CLK_HZ), .SCAN_DIV(SCAN_DIV)) u1 (
    .clk, .reset, .ena_scan, .ena_1hz, .flash_1hz
  );

  hld2_count_select #(
    .NS_GREEN_S(NS_GREEN_S), .NS_YELLOW_S(NS_YELLOW_S),
    .EW_GREEN_S(EW_GREEN_S), .EW_YELLOW_S(EW_YELLOW_S)
  ) u2 (
    .clk, .reset, .ena_scan, .recount, .sign_state, .load
  );

  hld3_countdown #(.LED_W(25), .CNT_W(SEC_W)) u3 (
    .clk, .reset, .ena_1hz, .recount, .load, .next_state, .cnt_ff, .led, .bcd
  );

  hld4_signal_control u4 (
    .clk, .reset, .ena_scan, .ena_1hz, .a_m, .st_butt, .next_state,
    .red, .green, .yellow, .sign_state, .recount
  );

endmodule
