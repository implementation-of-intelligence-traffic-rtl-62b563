// clk_div_1hz_tb: checks the 1 Hz enable.
//
// Two dividers run from the same clock, one with CLK_HZ = 7 and one with
// CLK_HZ = 1000. From power-up the testbench counts clocks itself and
// expects clk_1hz high exactly in cycles CLK_HZ-1, 2*CLK_HZ-1, ... (one
// cycle per CLK_HZ clocks), for several seconds of each.
module clk_div_1hz_tb;
  logic clk = 1'b0;
  logic p7, p1000;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_div_1hz #(.CLK_HZ(7))    dut7    (.clk, .clk_1hz(p7));
  clk_div_1hz #(.CLK_HZ(1000)) dut1000 (.clk, .clk_1hz(p1000));

  task automatic check(string what, logic got, logic exp, int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s in cycle %0d: got %b expected %b", what, n, got, exp);
    end
  endtask

  int pulses7 = 0, pulses1000 = 0;

  initial begin
    // cycle n is the n-th clock period after power-up, n = 0 first
    for (int n = 0; n < 5000; n++) begin
      #1;
      check("clk_1hz 7", p7, (n % 7) == 6, n);
      check("clk_1hz 1000", p1000, (n % 1000) == 999, n);
      pulses7 += int'(p7);
      pulses1000 += int'(p1000);
      @(posedge clk);
    end
    checks++;
    if (pulses7 != 714 || pulses1000 != 5) begin
      failures++;
      $display("FAIL pulse counts %0d %0d", pulses7, pulses1000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
