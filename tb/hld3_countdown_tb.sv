// hld3_countdown_tb: checks the countdown, its end flag and the displays.
//
// The testbench plays the part of hld1/hld2/hld4: a one-cycle ena_1hz
// every P = 8 clocks, and on every tick that sees next_state it starts a
// new state, raising recount for one cycle with a random duration of 1 to
// 25 s on 'load'. Now and then it restarts the count in the middle of a
// state, as a manual step does. A reference model tracks the seconds left
// (rem); each cycle the testbench expects
//   cnt_ff     = rem - 1,
//   next_state = (rem == 1) with no reload pending,
//   led        = rem lamps lit from bit 0 up,
//   bcd        = rem written as two decimal digits,
// and it checks that each state of N seconds lasts N * P clocks.
module hld3_countdown_tb;
  import tlc_pkg::*;
  localparam int P = 8;
  logic clk = 1'b0;
  logic reset, ena_1hz, recount;
  logic [SEC_W-1:0] load, cnt_ff;
  logic next_state;
  logic [24:0] led;
  logic [7:0] bcd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hld3_countdown dut (.clk, .reset, .ena_1hz, .recount, .load, .next_state, .cnt_ff, .led, .bcd);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  int rem, rq_q, cyc, last_adv, cur_len, states, restarts;
  string s;

  initial begin
    reset = 1'b1; recount = 1'b1; ena_1hz = 1'b0; load = 5'd25;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    rem = 1; rq_q = 0;   // model right after reset: count 0
    cyc = 0; last_adv = -1; cur_len = 25; states = 0; restarts = 0;
    // recount still high in the first cycle after reset, as hld4 drives it
    forever begin
      // model: what the block sees at this posedge
      if (rq_q == 1 && recount == 1'b0) rem = int'(load);
      else if (ena_1hz && rem > 1) rem--;
      rq_q = int'(recount);
      @(negedge clk);
      cyc++;
      check("cnt_ff", cnt_ff, rem - 1);
      check("next_state", next_state, (rem == 1) && !recount && rq_q == 0);
      check("led", led, (64'd1 << rem) - 1);
      s = $sformatf("%0d", rem);
      check("bcd", bcd, s.atohex());
      // drive the next cycle
      ena_1hz = (cyc % P) == 0;
      if (recount) recount = 1'b0;
      if (ena_1hz && next_state) begin
        // state advance: check its length, start the next one
        if (last_adv >= 0) check("state length", cyc - last_adv, cur_len * P);
        last_adv = cyc;
        cur_len = $urandom_range(25, 1);
        load = 5'(cur_len);
        recount = 1'b1;
        states++;
      end else if (!ena_1hz && rem > 3 && $urandom_range(200) == 0) begin
        // restart in the middle, as a manual step does
        last_adv = -1;
        cur_len = $urandom_range(25, 1);
        load = 5'(cur_len);
        recount = 1'b1;
        restarts++;
      end
      if (states >= 60) break;
    end
    checks++;
    if (restarts == 0) begin failures++; $display("FAIL no mid-state restart happened"); end
    $display("states %0d restarts %0d", states, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
