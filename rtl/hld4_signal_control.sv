// hld4_signal_control: signal state machine of the two-way controller.
//
// Four states cycle in a fixed order:
//   rewgsn (000) east-west red,    north-south green   red 01 green 10 yellow 00
//   rewysn (001) east-west red,    north-south yellow  red 01 green 00 yellow 10
//   gewrsn (100) east-west green,  north-south red     red 10 green 01 yellow 00
//   yewrsn (101) east-west yellow, north-south red     red 10 green 00 yellow 01
// (lamp vectors: bit 1 north-south, bit 0 east-west).
//
// a_m selects the mode. Automatic (a_m = 1): the state advances on the
// ena_1hz tick on which the countdown reports next_state, i.e. when the
// state's time is up. Manual (a_m = 0): the countdown is ignored and every
// press of st_butt advances one state, so an officer can step the lights.
// st_butt is synchronised with two flip-flops and its rising edge, sampled
// on ena_scan, is one press (st_transfer). Both kinds of advance happen
// only on ena_scan cycles. Reset (active high, synchronous) returns to
// rewgsn.
//
// recount asks hld2/hld3 to start the countdown of the new state: it is
// high from the cycle after a state change (and from reset) up to and
// including the next ena_scan cycle.
//
// The states, lamp codes of the first three states, mode input and the
// terms of the advance condition follow the original design; the fourth
// state's lamps, the button edge detection and the recount timing are
// choices of this implementation.
module hld4_signal_control
  import tlc_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        ena_scan,
  input  logic        ena_1hz,
  input  logic        a_m,
  input  logic        st_butt,
  input  logic        next_state,
  output logic [1:0]  red,
  output logic [1:0]  green,
  output logic [1:0]  yellow,
  output sign_state_t sign_state,
  output logic        recount
);

  // Button synchroniser and press detection.
  logic st_sync1, st_sync2, st_prev;
  logic st_transfer;

  always_ff @(posedge clk) begin
    if (reset) begin
      st_sync1 <= 1'b0;
      st_sync2 <= 1'b0;
      st_prev  <= 1'b0;
    end else begin
      st_sync1 <= st_butt;
      st_sync2 <= st_sync1;
      if (ena_scan)
        st_prev <= st_sync2;
    end
  end

  assign st_transfer = st_sync2 && !st_prev;

  logic advance;
  assign advance = ena_scan && ( ( a_m && ena_1hz && next_state)
                               || (!a_m && st_transfer) );

  always_ff @(posedge clk) begin
    if (reset) begin
      sign_state <= REWGSN;
      recount    <= 1'b1;
    end else if (advance) begin
      sign_state <= next_sign_state(sign_state);
      recount    <= 1'b1;
    end else if (ena_scan) begin
      recount    <= 1'b0;
    end
  end

  always_comb begin
    red    = 2'b00;
    green  = 2'b00;
    yellow = 2'b00;
    case (sign_state)
      REWGSN:  begin red[LAMP_EW] = 1'b1; green[LAMP_NS]  = 1'b1; end
      REWYSN:  begin red[LAMP_EW] = 1'b1; yellow[LAMP_NS] = 1'b1; end
      GEWRSN:  begin red[LAMP_NS] = 1'b1; green[LAMP_EW]  = 1'b1; end
      default: begin red[LAMP_NS] = 1'b1; yellow[LAMP_EW] = 1'b1; end
    endcase
  end

  // Exactly one lamp per road is lit.
  lamp_one_per_road: assert property (@(posedge clk) disable iff (reset)
    (red ^ green ^ yellow) == 2'b11 && (red & green) == 2'b00
    && (red & yellow) == 2'b00 && (green & yellow) == 2'b00);

endmodule
