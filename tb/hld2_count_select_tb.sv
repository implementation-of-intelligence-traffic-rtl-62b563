// hld2_count_select_tb: checks the duration look-up and its capture.
//
// For every signal state the testbench raises recount with and without
// ena_scan and expects 'load' to change only when both are high, to the
// state's duration: 25 s (000), 5 s (001), 15 s (100), 5 s (101). A second
// instance with other durations shows the parameters reach the table.
// Reset must give the first state's duration.
module hld2_count_select_tb;
  import tlc_pkg::*;
  logic clk = 1'b0;
  logic reset, ena_scan, recount;
  sign_state_t st;
  logic [SEC_W-1:0] load_a, load_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hld2_count_select dut_a (.clk, .reset, .ena_scan, .recount, .sign_state(st), .load(load_a));
  hld2_count_select #(.NS_GREEN_S(9), .NS_YELLOW_S(2), .EW_GREEN_S(31), .EW_YELLOW_S(3))
    dut_b (.clk, .reset, .ena_scan, .recount, .sign_state(st), .load(load_b));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  sign_state_t order [4] = '{REWYSN, GEWRSN, YEWRSN, REWGSN};
  int exp_a [4] = '{5, 15, 5, 25};
  int exp_b [4] = '{2, 31, 3, 9};

  initial begin
    reset = 1'b1; ena_scan = 1'b0; recount = 1'b0; st = YEWRSN;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check("reset value a", load_a, 25);
    check("reset value b", load_b, 9);
    for (int i = 0; i < 4; i++) begin
      int prev_a, prev_b;
      prev_a = load_a; prev_b = load_b;
      st = order[i];
      // recount without ena_scan: no capture
      recount = 1'b1; ena_scan = 1'b0;
      @(negedge clk);
      check("no capture without ena_scan", load_a, prev_a);
      // ena_scan without recount: no capture
      recount = 1'b0; ena_scan = 1'b1;
      @(negedge clk);
      check("no capture without recount", load_a, prev_a);
      check("no capture without recount b", load_b, prev_b);
      // both: capture
      recount = 1'b1; ena_scan = 1'b1;
      @(negedge clk);
      check($sformatf("load a state %b", order[i]), load_a, exp_a[i]);
      check($sformatf("load b state %b", order[i]), load_b, exp_b[i]);
      recount = 1'b0;
      st = order[(i + 2) % 4];
      @(negedge clk);
      check("held after recount", load_a, exp_a[i]);
    end
    reset = 1'b1;
    @(negedge clk);
    check("reset again", load_a, 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
