// hld4_signal_control_tb: checks the two-way signal state machine.
//
// Automatic mode: ena_scan, ena_1hz and next_state are driven at random
// (ena_scan 3 cycles in 4); the state must advance exactly in the cycles
// where all three are high, through 000 -> 001 -> 100 -> 101 -> 000, and
// recount must be high from the cycle after each advance through the next
// ena_scan cycle. Manual mode: countdown ends are ignored and each press of
// st_butt (held several cycles) advances exactly one state, within 4
// cycles. Every cycle the lamps are compared with the table of the four
// states, and reset must return to the first state with recount high.
module hld4_signal_control_tb;
  import tlc_pkg::*;
  logic clk = 1'b0;
  logic reset, ena_scan, ena_1hz, a_m, st_butt, next_state;
  logic [1:0] red, green, yellow;
  sign_state_t sign_state;
  logic recount;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hld4_signal_control dut (.clk, .reset, .ena_scan, .ena_1hz, .a_m, .st_butt, .next_state,
                           .red, .green, .yellow, .sign_state, .recount);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  // lamp table: {red, green, yellow}, bit 1 north-south, bit 0 east-west
  logic [2:0] codes [4] = '{3'b000, 3'b001, 3'b100, 3'b101};
  logic [5:0] lamps [4] = '{6'b01_10_00, 6'b01_00_10, 6'b10_01_00, 6'b10_00_01};

  int idx, rc, auto_adv, man_adv;

  task automatic check_outputs();
    check("sign_state", sign_state, codes[idx]);
    check("lamps", {red, green, yellow}, lamps[idx]);
    check("recount", recount, rc);
  endtask

  initial begin
    reset = 1'b1; ena_scan = 1'b0; ena_1hz = 1'b0; a_m = 1'b1; st_butt = 1'b0; next_state = 1'b0;
    repeat (2) @(negedge clk);
    check("reset state", sign_state, 3'b000);
    check("reset recount", recount, 1);
    reset = 1'b0;
    idx = 0; rc = 1; auto_adv = 0;
    // automatic mode, random enables
    for (int c = 0; c < 4000; c++) begin
      logic adv;
      ena_scan   = $urandom_range(3) != 0;
      ena_1hz    = $urandom_range(3) == 0;
      next_state = $urandom_range(1) == 1;
      st_butt    = $urandom_range(1) == 1;   // ignored in automatic mode
      adv = ena_scan && ena_1hz && next_state;
      @(negedge clk);
      if (adv) begin idx = (idx + 1) % 4; rc = 1; auto_adv++; end
      else if (ena_scan) rc = 0;
      check_outputs();
    end
    // manual mode
    a_m = 1'b0; st_butt = 1'b0; ena_scan = 1'b1;
    repeat (4) @(negedge clk);
    man_adv = 0;
    for (int p = 0; p < 12; p++) begin
      int seen;
      // countdown ends are ignored
      for (int c = 0; c < 10; c++) begin
        ena_1hz = (c % 3) == 0; next_state = 1'b1;
        @(negedge clk);
        check("manual: no advance without press", sign_state, codes[idx]);
      end
      // one press, held for 6 cycles, then released for 6
      seen = 0;
      st_butt = 1'b1;
      for (int c = 0; c < 12; c++) begin
        if (c == 6) st_butt = 1'b0;
        @(negedge clk);
        if (sign_state != codes[idx]) begin
          check("manual: step latency", c < 4, 1);
          idx = (idx + 1) % 4;
          seen++;
        end
        check("manual lamps", {red, green, yellow}, lamps[idx]);
      end
      check("manual: one step per press", seen, 1);
      man_adv += seen;
    end
    // reset from the middle of the cycle
    a_m = 1'b1;
    while (idx != 2) begin
      ena_1hz = 1'b1; next_state = 1'b1;
      @(negedge clk);
      idx = (idx + 1) % 4;
    end
    check("reached gewrsn", sign_state, 3'b100);
    reset = 1'b1;
    @(negedge clk);
    check("reset from gewrsn", sign_state, 3'b000);
    check("reset lamps", {red, green, yellow}, 6'b01_10_00);
    check("automatic advances happened", auto_adv > 100, 1);
    $display("automatic advances %0d, manual steps %0d", auto_adv, man_adv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
