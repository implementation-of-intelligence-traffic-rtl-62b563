// tlc4_controller: four-way crossroads controller driven by a (cnt, dir)
// state machine.
//
// The directions get right of way in turn: north, east, south, west
// (dir = 00, 01, 10, 11). Each turn has three steps, selected by cnt:
//   cnt 00  green of dir                        others red
//   cnt 01  yellow 1 of dir                     others red
//   cnt 10  yellow 2 and pedestrian of dir      others red
// after which dir advances and cnt returns to 00; after west comes north
// again. Each step lasts STEP_S seconds of the CLK_HZ clock. The output
// vectors are indexed by direction (bit 0 north, 1 east, 2 south, 3 west).
//
// rst_n is the controller's 'reset' input, active low and synchronous:
// while it is 0 all four reds are on and cnt = dir = 00; the first green
// (north) shows from the cycle after rst_n goes to 1, and each step then
// lasts exactly STEP_S * CLK_HZ clock cycles.
//
// The step sequence, the direction order, the lamps of each step and the
// reset behaviour follow the original design; its state diagram only says
// the lamps stay on 'for few seconds', so the step time (default 1 s) and
// the board clock rate are choices of this implementation.
module tlc4_controller
  import tlc_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,  // board clock frequency
  parameter int unsigned STEP_S = 1            // seconds per step
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] g,
  output logic [3:0] r,
  output logic [3:0] y1,
  output logic [3:0] y2,
  output logic [3:0] pd,
  output step_t      cnt,
  output dir_t       dir
);

  localparam int unsigned STEP_CYCLES = CLK_HZ * STEP_S;
  localparam int unsigned W = (STEP_CYCLES > 1) ? $clog2(STEP_CYCLES) : 1;

  logic [W-1:0] timer;
  logic         run;
  logic         step_end;

  assign step_end = (timer == W'(STEP_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run   <= 1'b0;
      timer <= '0;
      cnt   <= STEP_GREEN;
      dir   <= DIR_NORTH;
    end else begin
      run <= 1'b1;
      if (run) begin
        timer <= step_end ? '0 : timer + 1'b1;
        if (step_end) begin
          if (cnt == STEP_YELLOW2) begin
            cnt <= STEP_GREEN;
            dir <= dir_t'(dir + 2'd1);
          end else begin
            cnt <= step_t'(cnt + 2'd1);
          end
        end
      end
    end
  end

  always_comb begin
    g  = '0;
    y1 = '0;
    y2 = '0;
    pd = '0;
    r  = 4'b1111;
    if (run) begin
      r[dir] = 1'b0;
      case (cnt)
        STEP_GREEN:   g[dir]  = 1'b1;
        STEP_YELLOW1: y1[dir] = 1'b1;
        default: begin
          y2[dir] = 1'b1;
          pd[dir] = 1'b1;
        end
      endcase
    end
  end

endmodule
