// tlc_top_full_tb: end-to-end test of the three controllers at their real sizes.
//
// Nothing is scaled down: the two-way controller runs at 1 kHz (1000 clocks
// per second), the four-way controller and the three-junction controller at
// 50 MHz (50,000,000 clocks per second). The two clocks run one after the
// other to keep the simulation short.
//
// Part 1, two-way controller (1000 clocks per second of traffic):
//   - a full automatic cycle and a half: every state must last exactly its
//     time (25 s, 5 s, 15 s, 5 s, i.e. 25000, 5000, 15000, 5000 clocks),
//     the lamps must match the state, and in the middle of every second the
//     BCD value and the LED bar must show the seconds left;
//   - mode switch to manual: the lights hold, each st_butt press steps one
//     state and restarts the countdown; switch back to automatic;
//   - reset from the middle of a state.
// Part 2, 50 MHz clock, 12.6 s of real time:
//   - four-way controller released from reset: at the middle of every 1 s
//     step the lamps must be those of the step (north, east, south, west;
//     green, yellow 1, yellow 2 + pedestrian), then a reset gives all red;
//   - three-junction controller: junction 0 has cars on both roads and must
//     hand the green to east-west after 10 s; junction 1 gets a lone
//     east-west request and must keep east-west after the car has gone;
//     junction 2 keeps north-south until a lone east-west request arrives.
// Each mechanism is counted; one that never happens is a failure.
module tlc_top_full_tb;
  logic clk_1khz = 1'b0, clk_50m = 1'b0;
  bit   run_1khz = 1'b0, run_50m = 1'b0;
  logic reset, a_m, st_butt, rst_n;
  logic [1:0] tw_red, tw_green, tw_yellow;
  logic [2:0] tw_sign_state;
  logic tw_next_state, tw_recount, tw_flash_1hz;
  logic [4:0] tw_cnt_ff;
  logic [24:0] tw_led;
  logic [7:0] tw_bcd;
  logic [3:0] fw_g, fw_r, fw_y1, fw_y2, fw_pd;
  logic [1:0] fw_cnt, fw_dir;
  logic [2:0] nscar, ewcar, nslight, ewlight;
  int checks = 0, failures = 0;

  // Both clocks get a 20 ns period in simulation: the controllers count
  // clock cycles, so the two-way controller's 1000 cycles are one second
  // of its time whatever the simulated period. The 1 kHz clock runs only
  // during part 1; the 50 MHz clock runs throughout (the four-way
  // controller is held in reset during part 1).
  initial begin wait (run_1khz); while (run_1khz) #10 clk_1khz = ~clk_1khz; end
  always #10 clk_50m = ~clk_50m;

  tlc_top dut (
    .clk_1khz, .reset, .a_m, .st_butt,
    .tw_red, .tw_green, .tw_yellow, .tw_sign_state, .tw_next_state, .tw_recount,
    .tw_cnt_ff, .tw_led, .tw_bcd, .tw_flash_1hz,
    .clk_50m, .rst_n, .fw_g, .fw_r, .fw_y1, .fw_y2, .fw_pd, .fw_cnt, .fw_dir,
    .nscar, .ewcar, .nslight, .ewlight);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  function automatic int to_bcd(int v);
    string s;
    s = $sformatf("%0d", v);
    return s.atohex();
  endfunction

  // ---------------- part 1: two-way controller ----------------
  localparam int HZ = 1000;
  logic [2:0] codes [4] = '{3'b000, 3'b001, 3'b100, 3'b101};
  int secs [4] = '{25, 5, 15, 5};
  logic [5:0] lamps [4] = '{6'b01_10_00, 6'b01_00_10, 6'b10_01_00, 6'b10_00_01};

  int n_auto = 0, n_manual = 0, n_mode = 0, n_reload = 0, n_reset = 0;

  always @(posedge clk_1khz) if (tw_recount) n_reload++;

  task automatic run_state(int idx, bit disp, output int cycles);
    cycles = 0;
    while (tw_sign_state == codes[idx] && cycles < 40 * HZ) begin
      if (disp && cycles % HZ == HZ / 2) begin
        int left;
        left = secs[idx] - cycles / HZ;
        check("tw_bcd", tw_bcd, to_bcd(left));
        check("tw_led", tw_led, (64'd1 << left) - 1);
        check("tw lamps", {tw_red, tw_green, tw_yellow}, lamps[idx]);
      end
      @(negedge clk_1khz);
      cycles++;
    end
  endtask

  task automatic part1();
    int cyc, idx;
    run_1khz = 1'b1;
    reset = 1'b1; a_m = 1'b1; st_butt = 1'b0;
    repeat (3) @(negedge clk_1khz);
    reset = 1'b0;
    run_state(0, 1, cyc);
    check("first state 25 s", cyc, 25 * HZ);
    n_auto++;
    idx = 1;
    for (int n = 0; n < 5; n++) begin
      check("tw state order", tw_sign_state, codes[idx]);
      run_state(idx, 1, cyc);
      check($sformatf("tw state %b length", codes[idx]), cyc, secs[idx] * HZ);
      n_auto++;
      idx = (idx + 1) % 4;
    end
    // now in gewrsn (idx 2); switch to manual a few seconds in
    check("tw in gewrsn", tw_sign_state, 3'b100);
    repeat (4 * HZ) @(negedge clk_1khz);
    a_m = 1'b0; n_mode++;
    repeat (30 * HZ) @(negedge clk_1khz);
    check("manual: held past its time", tw_sign_state, 3'b100);
    for (int p = 3; p <= 6; p++) begin
      @(posedge tw_flash_1hz);
      @(negedge clk_1khz);
      st_butt = 1'b1;
      repeat (50) @(negedge clk_1khz);
      check("manual step", tw_sign_state, codes[p % 4]);
      check("manual step lamps", {tw_red, tw_green, tw_yellow}, lamps[p % 4]);
      check("manual step countdown", tw_bcd, to_bcd(secs[p % 4]));
      n_manual++;
      st_butt = 1'b0;
      repeat (300) @(negedge clk_1khz);
    end
    // in rewysn (idx 1); back to automatic
    a_m = 1'b1; n_mode++;
    run_state(1, 0, cyc);
    check("auto again ends rewysn in time", cyc <= 5 * HZ, 1);
    check("auto again: gewrsn", tw_sign_state, 3'b100);
    n_auto++;
    repeat (7 * HZ) @(negedge clk_1khz);
    reset = 1'b1; n_reset++;
    @(negedge clk_1khz);
    check("tw reset state", tw_sign_state, 3'b000);
    check("tw reset lamps", {tw_red, tw_green, tw_yellow}, lamps[0]);
    reset = 1'b0;
    run_state(0, 1, cyc);
    check("25 s after reset", cyc, 25 * HZ);
    run_1khz = 1'b0;
  endtask

  // ---------------- part 2: four-way and three-junction ----------------
  localparam longint SEC = 50_000_000;       // clocks per second
  localparam longint T = 20;                 // clock period
  logic [19:0] fw_table [12] = '{
    {4'b0001, 4'b1110, 4'b0000, 4'b0000, 4'b0000},
    {4'b0000, 4'b1110, 4'b0001, 4'b0000, 4'b0000},
    {4'b0000, 4'b1110, 4'b0000, 4'b0001, 4'b0001},
    {4'b0010, 4'b1101, 4'b0000, 4'b0000, 4'b0000},
    {4'b0000, 4'b1101, 4'b0010, 4'b0000, 4'b0000},
    {4'b0000, 4'b1101, 4'b0000, 4'b0010, 4'b0010},
    {4'b0100, 4'b1011, 4'b0000, 4'b0000, 4'b0000},
    {4'b0000, 4'b1011, 4'b0100, 4'b0000, 4'b0000},
    {4'b0000, 4'b1011, 4'b0000, 4'b0100, 4'b0100},
    {4'b1000, 4'b0111, 4'b0000, 4'b0000, 4'b0000},
    {4'b0000, 4'b0111, 4'b1000, 4'b0000, 4'b0000},
    {4'b0000, 4'b0111, 4'b0000, 4'b1000, 4'b1000}
  };
  int n_fw_steps = 0, n_fw_reset = 0, n_alt = 0, n_lone = 0, n_hold = 0;

  task automatic fw_check_steps();
    // rst_n rises 5 ns after the first rising edge; step k covers
    // clocks k*SEC+1 .. (k+1)*SEC counted from there
    #(SEC * T / 2);
    for (int k = 0; k < 12; k++) begin
      check($sformatf("four-way step %0d", k), {fw_g, fw_r, fw_y1, fw_y2, fw_pd}, fw_table[k]);
      check("four-way cnt/dir", {fw_dir, fw_cnt}, {2'(k / 3), 2'(k % 3)});
      if ({fw_g, fw_r, fw_y1, fw_y2, fw_pd} == fw_table[k]) n_fw_steps++;
      #(SEC * T);
    end
  endtask

  task automatic part2();
    rst_n = 1'b0;
    nscar = 3'b000; ewcar = 3'b000;
    run_50m = 1'b1;
    @(posedge clk_50m);
    #5;
    check("four-way all red in reset", {fw_g, fw_r, fw_y1, fw_y2, fw_pd},
          {4'b0000, 4'b1111, 4'b0000, 4'b0000, 4'b0000});
    rst_n = 1'b1;
    // junction 0: cars on both roads; junction 1: east-west only;
    // junction 2: north-south only
    nscar = 3'b101; ewcar = 3'b011;
    fork
      fw_check_steps();
      begin
        #(SEC * T * 3 / 2);                          // 1.5 s
        check("j1 lone east-west request", ewlight[1], 1);
        check("j0 still north-south", nslight[0], 1);
        if (ewlight[1]) n_lone++;
        ewcar[1] = 1'b0;                             // car gone
        #(SEC * T * 2);                              // 3.5 s
        ewcar[2] = 1'b1; nscar[2] = 1'b0;            // lone east-west at j2
        #(SEC * T * 2);                              // 5.5 s
        check("j1 keeps east-west with no cars", ewlight[1], 1);
        if (ewlight[1]) n_hold++;
        check("j2 switched to east-west", ewlight[2], 1);
        if (ewlight[2]) n_lone++;
        #(SEC * T * 4);                              // 9.5 s
        check("j0 north-south before 10 s", nslight[0], 1);
        #(SEC * T);                                  // 10.5 s
        check("j0 alternated to east-west", ewlight[0], 1);
        if (ewlight[0]) n_alt++;
        check("lights complementary", nslight ^ ewlight, 3'b111);
      end
    join
    // reset of the four-way controller
    rst_n = 1'b0;
    #(T * 2);
    check("four-way all red after reset", {fw_g, fw_r, fw_y1, fw_y2, fw_pd},
          {4'b0000, 4'b1111, 4'b0000, 4'b0000, 4'b0000});
    if (fw_r == 4'b1111) n_fw_reset++;
    run_50m = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; nscar = '0; ewcar = '0;
    part1();
    $display("two-way part done at %0t", $time);
    part2();
    $display("two-way: automatic advances %0d, manual steps %0d, mode switches %0d, reload clocks %0d, resets %0d",
             n_auto, n_manual, n_mode, n_reload, n_reset);
    $display("four-way: steps seen %0d of 12, resets %0d", n_fw_steps, n_fw_reset);
    $display("junctions: alternations %0d, lone-request switches %0d, holds %0d", n_alt, n_lone, n_hold);
    checks++;
    if (n_auto == 0 || n_manual == 0 || n_mode == 0 || n_reload == 0 || n_reset == 0
        || n_fw_steps != 12 || n_fw_reset == 0 || n_alt == 0 || n_lone == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: part 1 takes about 3.4 ms, part 2 about 12.6 s of traffic
  initial begin
    #(64'd400 * 64'd1_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
