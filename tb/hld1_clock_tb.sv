// hld1_clock_tb: checks the enables of hld1_clock against a cycle count.
//
// Two instances run side by side: one at the default 1 kHz / scan every
// clock, one with CLK_HZ = 24 and SCAN_DIV = 4. After reset is released
// the testbench counts clock edges itself (n = 1 after the first) and expects
//   ena_scan  when n mod SCAN_DIV = SCAN_DIV-1,
//   ena_1hz   when n mod CLK_HZ  = CLK_HZ-1 (one pulse per second),
//   flash_1hz when (n mod CLK_HZ) div SCAN_DIV < (CLK_HZ/SCAN_DIV)/2.
// It also counts the ena_1hz pulses over three seconds and resets once in
// the middle of a second to check that reset restarts the count.
module hld1_clock_tb;
  logic clk = 1'b0;
  logic reset;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic scan_a, sec_a, fl_a;
  logic scan_b, sec_b, fl_b;

  hld1_clock dut_a (.clk, .reset, .ena_scan(scan_a), .ena_1hz(sec_a), .flash_1hz(fl_a));
  hld1_clock #(.CLK_HZ(24), .SCAN_DIV(4)) dut_b (.clk, .reset, .ena_scan(scan_b), .ena_1hz(sec_b), .flash_1hz(fl_b));

  task automatic check(string what, logic got, logic exp, int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at n=%0d: got %b expected %b", what, n, got, exp);
    end
  endtask

  int pulses_a, pulses_b;

  task automatic run(int cycles);
    for (int k = 1; k <= cycles; k++) begin
      int n;
      @(negedge clk);
      n = k;   // clock edges seen since reset was released
      check("a.ena_scan",  scan_a, 1'b1, n);
      check("a.ena_1hz",   sec_a,  (n % 1000) == 999, n);
      check("a.flash_1hz", fl_a,   (n % 1000) < 500, n);
      check("b.ena_scan",  scan_b, (n % 4) == 3, n);
      check("b.ena_1hz",   sec_b,  (n % 24) == 23, n);
      check("b.flash_1hz", fl_b,   ((n % 24) / 4) < 3, n);
      pulses_a += int'(sec_a);
      pulses_b += int'(sec_b);
    end
  endtask

  initial begin
    reset = 1'b1;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    pulses_a = 0; pulses_b = 0;
    run(1510);
    // reset in the middle of a second, then three full seconds
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    pulses_a = 0; pulses_b = 0;
    run(3000);
    checks++;
    if (pulses_a != 3) begin failures++; $display("FAIL a: %0d pulses in 3 s", pulses_a); end
    checks++;
    if (pulses_b != 125) begin failures++; $display("FAIL b: %0d pulses in 125 s", pulses_b); end
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
