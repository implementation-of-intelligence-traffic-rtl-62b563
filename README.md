# Traffic light controllers for an FPGA

Three small, independent traffic light controllers, written as synthesizable
SystemVerilog for a low-cost FPGA board:

1. **Two-way controller with countdown** (`hld5_tlc2`). A north-south road
   crosses an east-west road. The lights cycle through four states on fixed
   times, a countdown bar of 25 LEDs (and a BCD value) shows drivers how many
   seconds are left, and a police officer can switch to manual mode and step
   the lights with a push button.
2. **Four-way controller with pedestrian lights** (`tlc4_controller`). North,
   east, south and west get right of way in turn; each turn is green, first
   yellow, then second yellow together with that direction's pedestrian
   light, while the other three directions show red.
3. **Sensor-driven controller for three junctions** (`traffic_cascade`). Each
   junction has a car sensor per road; a lone request gets the green, and when
   both roads have cars the green alternates between them.

`tlc_top` instantiates all three side by side. They share no signals; the
two-way controller has its own 1 kHz clock, the other two run from a 50 MHz
board clock.

## Two-way controller

### Signal states and lamps

The state is a 3-bit code, `sign_state`. Bit 2 tells which road has right of
way, bit 0 marks the yellow (clearing) step. Each lamp colour is a 2-bit
vector with **bit 1 = north-south** and **bit 0 = east-west**:

| state    | code | meaning                        | red | green | yellow | time |
|----------|------|--------------------------------|-----|-------|--------|------|
| `REWGSN` | 000  | east-west red, north-south green | 01 | 10 | 00 | 25 s |
| `REWYSN` | 001  | east-west red, north-south yellow | 01 | 00 | 10 | 5 s |
| `GEWRSN` | 100  | east-west green, north-south red | 10 | 01 | 00 | 15 s |
| `YEWRSN` | 101  | east-west yellow, north-south red | 10 | 00 | 01 | 5 s |

The order is always 000 → 001 → 100 → 101 → 000; a full cycle is 50 s.
Reset (`reset`, active high, synchronous) returns to `REWGSN`. An assertion in
`hld4_signal_control` checks that each road always has exactly one lamp on.

### The four circuits and how they hand over

```
             ena_scan, ena_1hz
  hld1_clock ─────────────┬──────────────┬───────────────┐
                          v              v               v
            sign_state, recount      load          next_state
  hld4_signal_control ─────────> hld2 ──────> hld3 ──────────> back to hld4
     lamps, sign_state        count_select   countdown: led, bcd
```

* `hld1_clock` divides the 1 kHz clock into `ena_scan` (every clock by
  default, `SCAN_DIV`), `ena_1hz` (one cycle per second, always on an
  `ena_scan` cycle) and `flash_1hz` (1 Hz square wave, brought out but not
  used by the controller).
* `hld4_signal_control` holds the state. It advances when
  `ena_scan && ((a_m && ena_1hz && next_state) || (!a_m && st_transfer))`.
  `st_transfer` is one press of `st_butt`: the button is synchronised with
  two flip-flops and its rising edge is taken on an `ena_scan` cycle.
* After every change (and after reset) `hld4` raises `recount` from the
  next cycle up to and including the next `ena_scan` cycle. During that
  `ena_scan` cycle `hld2_count_select` registers the new state's duration on
  `load`.
* `hld3_countdown` reloads its count when `recount` falls:
  `cnt_ff = load - 1`. It steps down once per `ena_1hz` and stops at 0.
  `next_state` is high while `cnt_ff` is 0 and no reload is pending.

The handover takes about three clocks, far less than a second. The state
changes on the tick that sees `cnt_ff == 0`, so a state of N seconds lasts
exactly N × `CLK_HZ` clocks: `cnt_ff` shows N-1 … 0, one second each. The
1 s ticks run freely from reset. A manual step therefore restarts the
countdown at the new state's full time, but its first second can be short.

In manual mode the countdown runs out and then waits at its last second. The
lights change only on a button press. When `a_m` goes back to 1, the
controller finishes the current state's countdown and carries on.

### Countdown display

The remaining time is `cnt_ff + 1` seconds, a look-up of `cnt_ff`:

* `led[24:0]` is a bar with one lamp per remaining second, filled from bit 0
  (`led = 2**(cnt_ff+1) - 1`). It is full at the start of the 25 s green and
  down to one lamp in the last second. A 1 lights a lamp, a 0 puts it out.
* `bcd[7:0]` is the same number as two BCD digits, tens in `bcd[7:4]`.

One countdown drives the displays of both roads.

## Four-way controller

A step counter `cnt` (00 green, 01 yellow 1, 10 yellow 2 + pedestrian) and a
direction `dir` (00 north, 01 east, 10 south, 11 west) form the state. After
step 10, `dir` advances and `cnt` returns to 00; after west comes north. The
outputs `g`, `r`, `y1`, `y2`, `pd` are 4-bit vectors indexed by direction
(bit 0 north … bit 3 west). In every step the other three directions are red.
In all three steps of its own turn, the active direction's red is off.

`rst_n` is active low and synchronous. While it is 0, all four reds are on
and `cnt = dir = 00`. North turns green the cycle after `rst_n` rises. Each
step then lasts `STEP_S × CLK_HZ` clocks (default 1 s at 50 MHz), so a full
round of twelve steps takes 12 s.

## Three-junction sensor-driven controller

`traffic_cascade` has exactly the ports `nscar[2:0]`, `ewcar[2:0]`, `clk`,
`nslight[2:0]`, `ewlight[2:0]`. Bit *i* belongs to junction *i*.
`nslight[i]`/`ewlight[i]` is the green of that road, and exactly one of the
two is on. `clk_div_1hz` turns the 50 MHz clock into a one-cycle enable
every 50,000,000 clocks. Once per second each junction applies:

| `nscar[i]` `ewcar[i]` | action |
|---|---|
| 1 1 | keep the green for `HOLD_S` s (default 10), then give it to the other road |
| 1 0 | north-south gets the green |
| 0 1 | east-west gets the green |
| 0 0 | the green stays where it is |

There is no reset port. The registers have power-up values: every junction
starts with north-south green, and the divider starts at 0.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `hld1_clock`, `hld5_tlc2` | `CLK_HZ` | 1000 | two-way controller clock (Hz) |
| | `SCAN_DIV` | 1 | clocks per `ena_scan` |
| `hld2_count_select`, `hld5_tlc2` | `NS_GREEN_S`, `NS_YELLOW_S`, `EW_GREEN_S`, `EW_YELLOW_S` | 25, 5, 15, 5 | state times (s), at most 25 for the bar |
| `hld3_countdown` | `LED_W`, `CNT_W` | 25, 5 | bar length, count width |
| `tlc4_controller` | `CLK_HZ`, `STEP_S` | 50,000,000, 1 | board clock, seconds per step |
| `traffic_cascade` | `CLK_HZ`, `HOLD_S` | 50,000,000, 10 | board clock, alternation period (s) |
| `clk_div_1hz` | `CLK_HZ` | 50,000,000 | board clock |

`tlc_top` has one parameter, `BOARD_HZ` (default 50,000,000), the frequency
of `clk_50m`, passed to the four-way and three-junction controllers; the
two-way controller inside it uses its defaults.

## Where this implementation makes its own choices

The original design gives the state machines, the lamp codes of the first
three two-way states, the 25/5/15/5 s timing, the 1 kHz and 50 MHz clocks,
the 25-bit LED output and the ports of the three-junction controller. The
points below are this implementation's own choices:

* **Two-way timing.** The design is quoted as "red 15 s, yellow 5 s, green
  25 s" for both roads. A fixed cycle cannot give both roads 25 s of green
  and 15 s of red, so the state sequence 25/5/15/5 s is used:
  north-south gets 25 s of green and east-west 15 s.
* **Fourth two-way state.** The lamps of east-west yellow are not given. They
  are taken by symmetry as red 10, green 00, yellow 01.
* **Timing-plan selector.** The original design also has a 3-bit selector on
  the seconds-count circuit whose purpose is not described. It is not built;
  only the normal-traffic plan exists.
* **Countdown display.** The LED bar coding and the extra BCD port are
  choices. So are the `recount` handshake, the button synchroniser and edge
  detection, and the scan rate.
* **Four-way step time.** The original says only "a few seconds", so each
  step lasts 1 s by default. The four-way controller reuses the 50 MHz
  board clock.
* **Three-junction rules.** Only the alternation under contention is
  described. Reading bit *i* as junction *i*, the one-road and no-car rules
  and `HOLD_S` = 10 s are choices. The camera input and alarm output that
  appear in its block diagram have no described function and are not built.

## How far it has been checked

* Every module passes its self-checking testbench in Verilator 5. Each
  testbench compares with values worked out independently of the RTL: lamp
  tables written out by hand, cycle counts, and reference models of the
  countdown and of the junction rules.
* The whole design passes its end-to-end test at the default sizes.
* Every file is accepted by Verilator's lint and by Yosys with the slang
  front end. Generic Yosys synthesis shows no latches and no
  combinational loops.
* The design has not been placed and routed for a particular FPGA, and it
  has not been tried on a board.
* The push-button input is synchronised but not debounced. A bouncing
  button can step the two-way controller more than once per press.

## Simulating

Every module has a self-checking testbench in `tb/` named `<module>_tb`. Each
ends by printing `TB_RESULT checks=N failures=M`. The testbenches use
`$urandom` and need `--timing`. To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/tlc_pkg.sv tb/hld5_tlc2_tb.sv --top-module hld5_tlc2_tb
./obj_dir/Vhld5_tlc2_tb
```

* The block testbenches use small clock rates, e.g. `CLK_HZ = 10`, and
  finish in well under a second.
* `tlc_top_full_tb` runs the whole design at its real sizes:
  * the two-way controller runs 1000 clocks per second, for about 160 s of
    traffic that includes both modes and a reset;
  * the four-way and three-junction controllers run 50,000,000 clocks per
    second, for 12.6 s of traffic;
  * the run takes about five minutes.
* `tlc_top_tb` is the same test with `BOARD_HZ = 5000` and finishes in
  under a second.
* Both count each mechanism and fail if one never happened: automatic
  advance, manual step, mode switch, countdown reload, reset, all twelve
  four-way steps, junction alternation, lone request, and hold.
* In simulation every clock has a 20 ns period. The controllers count
  clock cycles, so the period changes no result.
