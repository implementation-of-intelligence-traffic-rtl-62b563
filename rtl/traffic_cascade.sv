// traffic_cascade: sensor-driven controller for three cascaded junctions.
//
// Junction i has a car sensor per road, nscar[i] (north-south) and
// ewcar[i] (east-west), and one green per road, nslight[i] and ewlight[i];
// exactly one of the two is on at any time. The junctions work
// independently and decide once per second, on the 1 Hz enable from
// clk_div_1hz:
//   cars on both roads  - the green alternates, HOLD_S seconds each;
//   cars on one road    - that road gets (or keeps) the green;
//   no cars             - the green stays where it is.
// The entity has no reset: every junction powers up with north-south green,
// set by initial values on the declarations (FPGA power-up values; lint
// notes them).
// A sensor change is acted on at the next 1 s tick; after a change of
// green caused by a lone request, a later contention holds the green for
// HOLD_S seconds before it alternates.
//
// The ports, the 50 MHz clock divided to 1 Hz and the alternation under
// contention follow the original design. It does not give the meaning of
// the three bits, the behaviour with one or no request, or the alternation
// period; reading bit i as junction i, the rules above and HOLD_S = 10 s
// are choices of this implementation.
module traffic_cascade #(
  parameter int unsigned CLK_HZ = 50_000_000,  // board clock frequency
  parameter int unsigned HOLD_S = 10           // seconds per green under contention
) (
  input  logic [2:0] nscar,
  input  logic [2:0] ewcar,
  input  logic       clk,
  output logic [2:0] nslight,
  output logic [2:0] ewlight
);

  localparam int unsigned HW = (HOLD_S > 1) ? $clog2(HOLD_S) : 1;

  logic clk_1hz;

  clk_div_1hz #(.CLK_HZ(CLK_HZ)) u_div (.clk, .clk_1hz);

  logic [2:0]    grant_ns = 3'b111;      // 1: north-south has the green
  logic [HW-1:0] held [3] = '{default: '0};  // seconds the green has been held under contention

  for (genvar i = 0; i < 3; i++) begin : g_junction
    always_ff @(posedge clk) begin
      if (clk_1hz) begin
        unique case ({nscar[i], ewcar[i]})
          2'b11: begin
            if (held[i] == HW'(HOLD_S - 1)) begin
              grant_ns[i] <= !grant_ns[i];
              held[i]     <= '0;
            end else begin
              held[i]     <= held[i] + 1'b1;
            end
          end
          2'b10: begin
            grant_ns[i] <= 1'b1;
            held[i]     <= '0;
          end
          2'b01: begin
            grant_ns[i] <= 1'b0;
            held[i]     <= '0;
          end
          default: held[i] <= '0;
        endcase
      end
    end
  end

  assign nslight = grant_ns;
  assign ewlight = ~grant_ns;

endmodule
