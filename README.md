# Oscillation ring test for combinational logic

A delay test that needs no tester timing. The circuit under test is turned into
a ring oscillator:

1. Pick a path from a primary input to a primary output.
2. Set the other inputs so that every gate on the path passes a change through.
   Each side input sits at its non-controlling value: 1 for a NAND or AND, 0 for
   a NOR or OR.
3. Feed the output back into the input with an odd number of inversions overall.

The path then oscillates with a period of twice its delay. A stuck-at fault on
the path, or on a line holding a side input, stops the oscillation. A gate or
path delay fault stretches the period past one clock cycle. Counting the
output's transitions over a fixed window of clock cycles therefore tests the
logic at its working speed. Only simple added hardware is needed: a
multiplexer and an XOR in front of each input, and a transition counter behind
each output. The same counters also measure the speed of the path and, by
splitting each period into its high and low halves, its rising and falling
delays separately.

This repository holds synthesizable SystemVerilog for the complete test
organization. It is built around the ISCAS C17 benchmark circuit, together with
the four-pattern test set that covers all of C17's stuck-at and gate delay
faults.

## The circuit under test: C17

C17 has five inputs A–E, two outputs P and Q and six two-input NAND gates.
Three of its lines fan out: stem C to branches F and G, stem I to J and K, and
stem L to M and N.

```
H = NAND(A,F)   I = NAND(G,D)   L = NAND(B,J)
O = NAND(K,E)   P = NAND(H,M)   Q = NAND(N,O)
```

Counting the branches, the circuit has 17 lines, A to Q. That makes 34
single stuck-at faults.

`or_c17` writes these six gates with simulation delays. Each NAND rises after
`TRISE` and falls after `TFALL`, plus its own `EXTRA_x`. A nonzero `EXTRA_x`
is how a gate delay fault is modelled. Synthesis ignores all delays.

## How a ring is closed: connection, parity, pattern

For every primary input, a test pattern records four things:

| field      | meaning |
|------------|---------|
| `conn_en`  | the input is driven from a primary output instead of a constant |
| `conn_sel` | which output drives it |
| `path_par` | inversion parity of the sensitized path, 1 if it has an odd number of inverting gates |
| `pattern`  | the constant for inputs that are not fed back |

In addition, `observe` lists the outputs whose detectors are switched on.

The input stage (`or_input_stage`) is a multiplexer followed by an XOR for
each input. The controller sets the XOR of a fed-back input to the complement
of the path parity. An even path (two NANDs) is therefore closed through one
inversion, and an odd path (three NANDs) is closed directly. Either way the
ring has odd parity and must oscillate.

The default test set (`or_pkg::C17_TESTS`) has four patterns. Inputs are
listed A..E; "x" is a don't-care, applied as 0.

| # | feedback            | path parity | constants          | observed | rings (gates)                        |
|---|---------------------|-------------|--------------------|----------|--------------------------------------|
| 1 | A ← P, E ← Q        | even, even  | B=0 C=1 D=0        | P, Q     | A‑H‑P and E‑O‑Q, two at once (2 each) |
| 2 | B ← P               | even        | A=0 C=x D=0 E=0    | P, Q     | B‑L‑M‑P; Q follows over N (2)        |
| 3 | C ← Q               | odd         | A=1 B=0 D=1 E=1    | P, Q     | C‑G‑I‑K‑O‑Q; P follows over F‑H (3)  |
| 4 | D ← P               | odd         | A=0 B=1 C=1 E=x    | P        | D‑I‑J‑L‑M‑P (3)                      |

An observed output that is not fed back lies on a secondary path. This is a
second sensitized path that shares the ring, such as Q in pattern 2. Its
detector checks extra lines for free.

## Passing and failing: the detectors

`or_detector` counts the rising edges of one output while the measurement
window is open. It is an `or_pulse_counter`, which is a counter clocked by the
AND of the output and the window, plus a compare. A detector that is switched
on fails when it counts fewer than `MIN_COUNT` edges.

The window is `WIN_CYCLES` clock cycles long, 64 by default.
`MIN_COUNT = WIN_CYCLES-1` (63) means the ring must complete at least one
period per clock cycle. One edge of slack covers the phase of the window.
`or_output_stage` ORs the fail flags of the active detectors into `detect`.

The ring counters are clocked by the ring itself. Two consequences follow:

* **Clearing:** they are cleared asynchronously by `clear_n`. The controller
  drives `clear_n` low only during the first phase of each pattern, so every
  pattern starts with a clear edge.
* **Reading:** the controller reads `detect` only a few cycles after the
  window has closed, once the counts are stable.

## The test controller and the timing of one pattern

`or_test_controller` plays the role of the host. It walks through the table
(`TESTS`, `NTEST`). For each pattern it drives the test conditions and runs
four phases:

| phase  | cycles          | what happens |
|--------|-----------------|--------------|
| APPLY  | `SETTLE_CYCLES` | counters held cleared; the ring starts |
| WINDOW | `WIN_CYCLES`    | `window` high; all counters run |
| HOLD   | `SETTLE_CYCLES` | window closed; counts settle |
| CHECK  | 1               | `result_valid`; `detect` is stored in `test_fail[cur_test]` |

With the defaults, one pattern takes 2·4 + 64 + 1 = 73 clock cycles and the
four-pattern set takes 292. At the end `done` is raised, and `pass` too if no
pattern failed.

An assertion checks that the window never opens while the counters are being
cleared.

## Speed and duty-cycle measurement

Two extra counters watch the output chosen by `meas_sel` (0 = P, 1 = Q). Both
use the same window as the detectors.

* `or_pulse_counter` (`speed_count`) counts ring periods inside the window.
  The ring period, and with it the delay of the tested path, is
  `WIN_CYCLES · Tclk / speed_count`. Measured on the longest path of a
  circuit, this is its maximum working frequency.
* `or_duty_counter` (`high_count`, `low_count`) counts periods of a fast clock
  `fclk`, separately while the output is 1 and while it is 0.
  * **Ring on a single path:** the high time is the sum of the path's delays
    for one direction of the transition, and the low time the sum for the
    other. Unequal counts therefore show unequal rising and falling delays.
  * **Rings formed by several reconvergent paths:** here a delay fault on one
    path only changes the duty cycle and does not stop the oscillation, so
    this counter is the way to see it.
  * **Sampling:** the output and the window are sampled by a two-flop
    synchronizer in the `fclk` domain.

## Top level and its one combinational loop

`or_ring_test_top` connects the blocks:

```
            +-----------------+   pattern, conn_en/sel, inv, observe
 start ---> | or_test_control |-------------------------------+
 done/pass  |   (host)        |<-- detect --+                 |
            +-----------------+             |                 v
                 clear_n, window            |         +----------------+
                     |                      |   po    | or_input_stage |
                     v                      |  +----->|  mux + XOR     |
            +-----------------+             |  |      +----------------+
            | or_output_stage |-------------+  |              | cut_in
            |  detectors + OR |<----- po ------+              v
            +-----------------+                |      +----------------+
  meas_sel -> or_pulse_counter, or_duty_counter <-- po| or_c17 (CUT)   |
                                                      +----------------+
```

The path output → multiplexer → XOR → input is a combinational loop on
purpose: it is the oscillator. Lint and synthesis tools report it. For static
timing analysis it has to be broken, or declared as a false path.

In simulation, the loop settles only because the C17 gates carry delays. The
multiplexer and XOR are zero-delay in the model. On silicon they add their own
delay to every ring, so measured periods include that overhead. The same holds
for a scan-based microprocessor, where the multiplexer and XOR would sit in
the scan cell.

Top-level parameters:

* `NTEST`, `TESTS`: the test set, default the C17 set above.
* `WIN_CYCLES`, `SETTLE_CYCLES`, `MIN_COUNT`: the measurement window and the
  pass threshold.
* `CNT_W`: counter width, 16 bits.
* `TRISE`, `TFALL`, `EXTRA_H` … `EXTRA_Q`: C17 gate delays in ps. They matter
  only to simulation.

## Files

| file | contents |
|------|----------|
| `rtl/or_pkg.sv` | sizes, the `or_test_t` test-condition struct, the C17 test set |
| `rtl/or_c17.sv` | circuit under test |
| `rtl/or_input_stage.sv` | multiplexer + XOR per input (generic `NPI`, `NPO`) |
| `rtl/or_pulse_counter.sv` | window-gated pulse counter |
| `rtl/or_detector.sv` | transition-counting oscillation detector |
| `rtl/or_output_stage.sv` | detector bank + OR (generic `NPO`) |
| `rtl/or_duty_counter.sv` | high/low half-period counter |
| `rtl/or_test_controller.sv` | sequencer (host) |
| `rtl/or_ring_test_top.sv` | top level |

Each block has a self-checking testbench `tb/tb_<module>.sv`.

## Simulating

Verilator 5 with timing support is needed, because the ring relies on the
gate delays. All files use a 1 ps time unit. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/or_pkg.sv tb/tb_or_ring_test_top.sv --top-module tb_or_ring_test_top
./obj_dir/Vtb_or_ring_test_top
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. The
testbenches use an 800 ps clock, a 20 ps fast clock and 100 ps gates. The
fault-free rings then have periods of 400 ps (two gates) and 600 ps (three
gates), both within one clock.

| testbench | what it shows |
|-----------|---------------|
| `tb_or_ring_test_top` | whole test set on two copies. <br>Default gates: all patterns pass, speed counts match 51200 ps / ring period (128 and 85). <br>Copy with 80/120 ps rise/fall and gate I 300 ps slow: patterns 3 and 4 fail (1200 ps ring), and the duty counter reads about 1323 against 1237 fast pulses, showing the unequal rise and fall delays. <br>Forced stuck-at faults on H, I and O fail exactly the patterns worked out by hand. <br>Also counts that each mechanism occurred: two rings at once, secondary outputs, XOR inversion, stuck-at and delay detection, speed and duty measurement. |
| `tb_or_ring_test_top_full` | one complete run with every parameter at its default, fault-free and with H stuck-at-1; also checks 73 cycles per pattern |
| `tb_or_c17_fault_coverage` | all 34 single stuck-at faults (forced line by line) and a 300 ps delay fault on each of the six gates: all 40 are detected by the four patterns |
| `tb_or_single_pattern_example` | the single pattern (A,B,C,D,E) = (0,1,P,1,0) with rings over C‑G‑I‑J‑L‑M‑P and C‑G‑I‑J‑L‑N‑Q. See below. |
| block testbenches | exhaustive C17 truth table and path timing; randomized input stage; exact pulse, detector, output-stage and duty counts; controller sequencing and cycle counts |

Results of `tb_or_single_pattern_example`:

* **Detected (checked):** the 22 faults on the ring lines and the side inputs
  held at 1, meaning both polarities on C, G, I, J, L, M, N, P and Q, plus
  stuck-at-0 on B, D, H and O.
* **Not detected (checked):** the 10 faults that cannot change the outputs.
* **Race-dependent, reported only:** A stuck-at-1 and E stuck-at-1. Each turns
  a side gate into a copy of the ring, and detecting it is a race between
  equal delays. With the default delays, A stuck-at-1 is caught and E
  stuck-at-1 is not.

## Choices made in this design

* **Input stage:** written as plain multiplexers and XOR gates. A PLA would do
  the same job.
* **Pass threshold:** `WIN_CYCLES-1` edges in `WIN_CYCLES` clock cycles. The
  window length, settle times and counter widths are free choices. The
  counters saturate rather than wrap.
* **Phase sequence:** the controller's APPLY/WINDOW/HOLD/CHECK phases and
  its table parameter are this design's own. A host outside the chip could
  drive the same signals instead.
* **Don't-care pattern bits:** applied as 0.
* **Duty counter:** gates the fast pulses with counter enables after a
  synchronizer, not with AND gates on the clock. It counts the same pulses,
  two fast cycles later.
* **Gate delays:** the values are illustrative. Only the relation between the
  ring period and the clock period matters.

## Not included

* **Test generation:** path selection and flunk-line marking are software
  that produces test tables such as `C17_TESTS`, so no hardware is given for
  them.
* **Other benchmark circuits:** only C17 is provided. The input and output
  stages are generic in the number of inputs and outputs, but `or_test_t` is
  sized for C17 (5 inputs, 2 outputs). For another circuit, change the sizes
  in `or_pkg`, supply its netlist and test table, and adjust the measurement
  widths.
* **Scan-cell variant:** a microprocessor with scan design would place the
  multiplexer and XOR in its scan cells. That variant is not written here.
