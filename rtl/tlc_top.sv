// tlc_top: the three traffic light controllers side by side.
//
//   tw_*  two-way north-south / east-west controller with countdown bar and
//         automatic / manual mode (hld5_tlc2), 1 kHz clock, reset active high;
//   fw_*  four-way controller with pedestrian lights (tlc4_controller),
//         50 MHz board clock, reset active low;
//   nscar / ewcar / nslight / ewlight
//         sensor-driven controller of three junctions (traffic_cascade),
//         on the same 50 MHz clock, no reset.
// The controllers share no logic and no signals; each keeps its own timing
// as described in its own module. BOARD_HZ is the frequency of clk_50m.
module tlc_top
  import tlc_pkg::*;
#(
  parameter int unsigned BOARD_HZ = 50_000_000
) (
  // two-way controller
  input  logic        clk_1khz,
  input  logic        reset,
  input  logic        a_m,
  input  logic        st_butt,
  output logic [1:0]  tw_red,
  output logic [1:0]  tw_green,
  output logic [1:0]  tw_yellow,
  output logic [2:0]  tw_sign_state,
  output logic        tw_next_state,
  output logic        tw_recount,
  output logic [4:0]  tw_cnt_ff,
  output logic [24:0] tw_led,
  output logic [7:0]  tw_bcd,
  output logic        tw_flash_1hz,
  // four-way controller
  input  logic        clk_50m,
  input  logic        rst_n,
  output logic [3:0]  fw_g,
  output logic [3:0]  fw_r,
  output logic [3:0]  fw_y1,
  output logic [3:0]  fw_y2,
  output logic [3:0]  fw_pd,
  output logic [1:0]  fw_cnt,
  output logic [1:0]  fw_dir,
  // three-junction sensor-driven controller
  input  logic [2:0]  nscar,
  input  logic [2:0]  ewcar,
  output logic [2:0]  nslight,
  output logic [2:0]  ewlight
);

  sign_state_t tw_state;
  step_t       fw_step;
  dir_t        fw_direction;

  hld5_tlc2 u_two_way (
    .clk(clk_1khz), .reset, .a_m, .st_butt,
    .red(tw_red), .green(tw_green), .yellow(tw_yellow),
    .sign_state(tw_state), .next_state(tw_next_state), .recount(tw_recount),
    .cnt_ff(tw_cnt_ff),
    .led(tw_led), .bcd(tw_bcd), .flash_1hz(tw_flash_1hz)
  );

  assign tw_sign_state = tw_state;

  tlc4_controller #(.CLK_HZ(BOARD_HZ)) u_four_way (
    .clk(clk_50m), .rst_n,
    .g(fw_g), .r(fw_r), .y1(fw_y1), .y2(fw_y2), .pd(fw_pd),
    .cnt(fw_step), .dir(fw_direction)
  );

  assign fw_cnt = fw_step;
  assign fw_dir = fw_direction;

  traffic_cascade #(.CLK_HZ(BOARD_HZ)) u_cascade (
    .nscar, .ewcar, .clk(clk_50m), .nslight, .ewlight
  );

endmodule
