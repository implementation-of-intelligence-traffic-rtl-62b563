// hld5_tlc2_tb: end-to-end test of the two-way controller.
//
// The controller runs with a 10 Hz clock (CLK_HZ = 10, so one second is 10
// cycles) and a scan enable every 2nd cycle. In automatic mode it must run
// the cycle rewgsn 25 s, rewysn 5 s, gewrsn 15 s, yewrsn 5 s twice, each
// state lasting exactly its time in clock cycles from the first advance;
// in the middle of every second the countdown bar and the BCD value must
// show the seconds left. Then, in manual mode, it must stay put for 60 s
// and take exactly one step per st_butt press with the countdown restarted
// at the new state's full time; back in automatic mode it must finish that
// state and go on.
module hld5_tlc2_tb;
  import tlc_pkg::*;
  localparam int HZ = 10;
  logic clk = 1'b0;
  logic reset, a_m, st_butt;
  logic [1:0] red, green, yellow;
  sign_state_t sign_state;
  logic next_state, recount, flash_1hz;
  logic [4:0] cnt_ff;
  logic [24:0] led;
  logic [7:0] bcd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hld5_tlc2 #(.CLK_HZ(HZ), .SCAN_DIV(2)) dut (
    .clk, .reset, .a_m, .st_butt, .red, .green, .yellow, .sign_state,
    .next_state, .recount, .cnt_ff, .led, .bcd, .flash_1hz);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  logic [2:0] codes [4] = '{3'b000, 3'b001, 3'b100, 3'b101};
  int secs [4] = '{25, 5, 15, 5};
  logic [5:0] lamps [4] = '{6'b01_10_00, 6'b01_00_10, 6'b10_01_00, 6'b10_00_01};

  function automatic int to_bcd(int v);
    string s;
    s = $sformatf("%0d", v);
    return s.atohex();
  endfunction

  // Run until the state changes (or a limit); return the cycles it took and
  // check the displays in the middle of every second on the way.
  task automatic run_state(int idx, int limit, bit disp, output int cycles);
    cycles = 0;
    while (sign_state == codes[idx] && cycles < limit) begin
      if (disp && cycles % HZ == HZ / 2) begin
        int left;
        left = secs[idx] - cycles / HZ;
        check("bcd", bcd, to_bcd(left));
        check("led", led, (64'd1 << left) - 1);
        check("lamps", {red, green, yellow}, lamps[idx]);
      end
      @(negedge clk);
      cycles++;
    end
  endtask

  int cyc, idx, states_seen;

  initial begin
    reset = 1'b1; a_m = 1'b1; st_butt = 1'b0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    // first state: from reset release
    run_state(0, 40 * HZ, 1, cyc);
    check("first state length", cyc, 25 * HZ);
    idx = 1; states_seen = 1;
    for (int n = 0; n < 7; n++) begin
      check("state order", sign_state, codes[idx]);
      run_state(idx, 40 * HZ, 1, cyc);
      check($sformatf("length of state %b", codes[idx]), cyc, secs[idx] * HZ);
      idx = (idx + 1) % 4;
      states_seen++;
    end
    // manual mode: now in rewgsn again, a little way in
    check("back to rewgsn", sign_state, 3'b000);
    repeat (3 * HZ) @(negedge clk);
    a_m = 1'b0;
    repeat (60 * HZ) @(negedge clk);
    check("manual: holds without press", sign_state, 3'b000);
    check("manual: countdown stopped at last second", bcd, to_bcd(1));
    for (int p = 1; p <= 5; p++) begin
      // press at the start of a second, so no tick falls before the check
      @(posedge flash_1hz);
      @(negedge clk);
      st_butt = 1'b1;
      repeat (8) @(negedge clk);
      check("manual step", sign_state, codes[p % 4]);
      check("manual lamps", {red, green, yellow}, lamps[p % 4]);
      check("manual countdown restarted", bcd, to_bcd(secs[p % 4]));
      st_butt = 1'b0;
      repeat (8) @(negedge clk);
    end
    // now in rewysn (5 s); back to automatic mode
    a_m = 1'b1;
    run_state(1, 40 * HZ, 0, cyc);
    check("auto again: rewysn ends within its time", cyc <= 5 * HZ, 1);
    check("auto again: next is gewrsn", sign_state, 3'b100);
    $display("states %0d", states_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300 * HZ) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
