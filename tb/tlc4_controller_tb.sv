// tlc4_controller_tb: checks the four-way (cnt, dir) controller.
//
// With CLK_HZ = 3 and STEP_S = 2 every step lasts 6 clocks. While rst_n is
// 0 all four reds must be on and nothing else. After release the testbench
// expects, for two full rounds, the steps north, east, south, west, each as
// green, yellow 1, yellow 2 with the pedestrian light, for exactly 6 clocks
// each, the active direction's red off and the other three reds on. It
// compares every cycle with a table written out by hand, then pulls rst_n
// low in the middle of a round and checks the return to all-red and to
// north green.
module tlc4_controller_tb;
  import tlc_pkg::*;
  localparam int STEP = 6;
  logic clk = 1'b0;
  logic rst_n;
  logic [3:0] g, r, y1, y2, pd;
  step_t cnt;
  dir_t dir;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tlc4_controller #(.CLK_HZ(3), .STEP_S(2)) dut (.clk, .rst_n, .g, .r, .y1, .y2, .pd, .cnt, .dir);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  // {g, r, y1, y2, pd} for the 12 states, bit 0 north, 1 east, 2 south, 3 west
  logic [19:0] table_ [12] = '{
    {4'b0001, 4'b1110, 4'b0000, 4'b0000, 4'b0000},   // cnt 00 dir 00: GN
    {4'b0000, 4'b1110, 4'b0001, 4'b0000, 4'b0000},   // cnt 01 dir 00: Y1N
    {4'b0000, 4'b1110, 4'b0000, 4'b0001, 4'b0001},   // cnt 10 dir 00: Y2N PDN
    {4'b0010, 4'b1101, 4'b0000, 4'b0000, 4'b0000},   // east
    {4'b0000, 4'b1101, 4'b0010, 4'b0000, 4'b0000},
    {4'b0000, 4'b1101, 4'b0000, 4'b0010, 4'b0010},
    {4'b0100, 4'b1011, 4'b0000, 4'b0000, 4'b0000},   // south
    {4'b0000, 4'b1011, 4'b0100, 4'b0000, 4'b0000},
    {4'b0000, 4'b1011, 4'b0000, 4'b0100, 4'b0100},
    {4'b1000, 4'b0111, 4'b0000, 4'b0000, 4'b0000},   // west
    {4'b0000, 4'b0111, 4'b1000, 4'b0000, 4'b0000},
    {4'b0000, 4'b0111, 4'b0000, 4'b1000, 4'b1000}
  };
  localparam logic [19:0] ALL_RED = {4'b0000, 4'b1111, 4'b0000, 4'b0000, 4'b0000};

  int steps_seen [12];

  initial begin
    rst_n = 1'b0;
    repeat (5) begin
      @(negedge clk);
      check("reset: all red", {g, r, y1, y2, pd}, ALL_RED);
      check("reset: cnt/dir", {cnt, dir}, 0);
    end
    rst_n = 1'b1;
    for (int k = 0; k < 24 * STEP; k++) begin
      int s;
      s = (k / STEP) % 12;
      @(negedge clk);
      check($sformatf("lamps state %0d", s), {g, r, y1, y2, pd}, table_[s]);
      check("cnt", cnt, s % 3);
      check("dir", dir, s / 3);
      steps_seen[s]++;
    end
    // reset in the middle of a round
    repeat (4 * STEP + 2) @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    check("reset mid-round: all red", {g, r, y1, y2, pd}, ALL_RED);
    rst_n = 1'b1;
    @(negedge clk);
    @(negedge clk);
    check("after reset: north green", {g, r, y1, y2, pd}, table_[0]);
    for (int s = 0; s < 12; s++) check("every state twice", steps_seen[s], 2 * STEP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
