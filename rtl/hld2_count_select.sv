// hld2_count_select: seconds-count selection of the two-way controller.
//
// Every signal state lasts a fixed number of seconds. When the signal
// controller (hld4) changes state it raises recount; on the next ena_scan
// cycle with recount high this block looks the new state up and registers
// its duration on 'load', which the countdown (hld3) then takes over.
//
// Durations (normal traffic): north-south green 25 s, north-south yellow
// 5 s, east-west green 15 s, east-west yellow 5 s. The numbers are the
// original design's; they are parameters so another timing plan needs no
// code change. The capture handshake is this implementation's choice.
// Latency: load is valid the cycle after the capturing ena_scan cycle.
module hld2_count_select
  import tlc_pkg::*;
#(
  parameter int unsigned NS_GREEN_S  = 25,
  parameter int unsigned NS_YELLOW_S = 5,
  parameter int unsigned EW_GREEN_S  = 15,
  parameter int unsigned EW_YELLOW_S = 5
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             ena_scan,
  input  logic             recount,
  input  sign_state_t      sign_state,
  output logic [SEC_W-1:0] load
);

  logic [SEC_W-1:0] duration;

  always_comb begin
    case (sign_state)
      REWGSN:  duration = SEC_W'(NS_GREEN_S);
      REWYSN:  duration = SEC_W'(NS_YELLOW_S);
      GEWRSN:  duration = SEC_W'(EW_GREEN_S);
      default: duration = SEC_W'(EW_YELLOW_S);
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset)
      load <= SEC_W'(NS_GREEN_S);
    else if (recount && ena_scan)
      load <= duration;
  end

endmodule
