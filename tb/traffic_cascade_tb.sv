// traffic_cascade_tb: checks the three-junction sensor-driven controller.
//
// The controller runs with CLK_HZ = 4 (a decision every 4 clocks) and
// HOLD_S = 3. From power-up, the testbench changes the car sensors of each
// junction at random every few seconds, with long stretches of cars on
// both roads, and runs a reference model of the rules once per second:
// both roads waiting - the green changes road after 3 s; one road waiting -
// that road gets the green; none - the green stays. Every cycle nslight
// and ewlight must match the model and be each other's complement. It
// counts how often each rule fired at each junction and fails if one
// never did.
module traffic_cascade_tb;
  localparam int HZ = 4, HOLD = 3;
  logic clk = 1'b0;
  logic [2:0] nscar, ewcar, nslight, ewlight;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  traffic_cascade #(.CLK_HZ(HZ), .HOLD_S(HOLD)) dut (.nscar, .ewcar, .clk, .nslight, .ewlight);

  task automatic check(string what, longint got, longint exp, int n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s in cycle %0d: got %0b expected %0b", what, n, got, exp);
    end
  endtask

  bit ns_green [3] = '{1, 1, 1};
  int held [3] = '{0, 0, 0};
  int n_alt [3], n_lone [3], n_idle [3];

  initial begin
    nscar = 3'b000; ewcar = 3'b000;
    for (int n = 0; n < 20000; n++) begin
      // new sensor pattern for a junction now and then
      if (n % 8 == 1) begin
        for (int i = 0; i < 3; i++) begin
          if ($urandom_range(5) == 0) begin
            int pick;
            pick = $urandom_range(5);
            // 0: no cars, 1: north-south only, 2: east-west only, 3-5: both
            nscar[i] = (pick == 1) || (pick >= 3);
            ewcar[i] = (pick == 2) || (pick >= 3);
          end
        end
      end
      @(posedge clk);
      if (n % HZ == HZ - 1) begin
        for (int i = 0; i < 3; i++) begin
          case ({nscar[i], ewcar[i]})
            2'b11: begin
              held[i]++;
              if (held[i] == HOLD) begin
                ns_green[i] = !ns_green[i];
                held[i] = 0;
                n_alt[i]++;
              end
            end
            2'b10: begin
              if (!ns_green[i]) n_lone[i]++;
              ns_green[i] = 1; held[i] = 0;
            end
            2'b01: begin
              if (ns_green[i]) n_lone[i]++;
              ns_green[i] = 0; held[i] = 0;
            end
            default: begin
              held[i] = 0;
              n_idle[i]++;
            end
          endcase
        end
      end
      #1;
      for (int i = 0; i < 3; i++) begin
        check($sformatf("nslight[%0d]", i), nslight[i], ns_green[i], n);
        check($sformatf("ewlight[%0d]", i), ewlight[i], !ns_green[i], n);
      end
    end
    for (int i = 0; i < 3; i++) begin
      $display("junction %0d: alternations %0d, lone-request switches %0d, idle seconds %0d",
               i, n_alt[i], n_lone[i], n_idle[i]);
      checks++;
      if (n_alt[i] == 0 || n_lone[i] == 0 || n_idle[i] == 0) begin
        failures++;
        $display("FAIL junction %0d: a rule never fired", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
