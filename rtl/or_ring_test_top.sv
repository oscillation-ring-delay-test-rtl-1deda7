// or_ring_test_top: oscillation ring test organization for the C17 circuit.
//
// The idea: connect a primary output of the circuit under test back to one
// of its primary inputs with odd inversion parity, and set the other inputs
// so that a path from that input to that output is sensitized. The path and
// the feedback then form a ring oscillator whose period is twice the path
// delay. A stuck-at fault on the ring, or on a line holding a side input at
// its non-controlling value, stops the oscillation; a gate or path delay
// fault makes the period longer than a clock cycle. Either is seen by a
// transition-counting detector on the output, so the circuit is tested at
// its working speed with no tester timing.
//
// Structure:
//   or_test_controller  host: sequences the test conditions, opens window T
//   or_input_stage      multiplexer + XOR per primary input
//   or_c17              circuit under test
//   or_output_stage     one detector per primary output, OR-ed into detect
//   or_pulse_counter    speed measurement: ring pulses during T
//   or_duty_counter     duty-cycle measurement: fast pulses in the 1 and 0
//                       half cycles during T (rising and falling path delay)
// The two measurement counters watch the output chosen by meas_sel. The test
// set is a parameter (TESTS, NTEST); its default is the complete four-pattern
// C17 test of or_pkg.
// The organization follows the published scheme; the controller's phase
// sequence, the pass threshold (WIN_CYCLES-1 ring edges in WIN_CYCLES clock
// cycles, i.e. the ring must run at least at the clock rate) and the counter
// widths are this design's choices.
//
// The feedback through the input stage is a deliberate combinational loop:
// it is the oscillation ring itself, so tools report a combinational loop
// here by design. In simulation the C17 gate delays (TRISE, TFALL and
// EXTRA_* parameters, ps) set the ring period and duty cycle; synthesis
// ignores them.
//
// Interface: clk (working-speed clock), fclk (fast pulse train for the duty
// measurement), rst_n (async, active low), start, meas_sel (0=P, 1=Q).
// Results: pass/done/test_fail at the end; per pattern, result_valid with
// cur_test, det_fail, det_count, speed_count, high_count, low_count.
// Timing: one pattern takes 2*SETTLE_CYCLES + WIN_CYCLES + 1 clk cycles.
module or_ring_test_top
  import or_pkg::*;
#(
  parameter int unsigned NTEST         = C17_NTEST,
  parameter or_test_t    TESTS [NTEST] = C17_TESTS,
  parameter int unsigned WIN_CYCLES    = 64,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned CNT_W         = 16,
  parameter int unsigned MIN_COUNT     = WIN_CYCLES - 1,
  parameter int unsigned TRISE         = 100,
  parameter int unsigned TFALL         = 100,
  parameter int unsigned EXTRA_H       = 0,
  parameter int unsigned EXTRA_I       = 0,
  parameter int unsigned EXTRA_L       = 0,
  parameter int unsigned EXTRA_O       = 0,
  parameter int unsigned EXTRA_P       = 0,
  parameter int unsigned EXTRA_Q       = 0,
  parameter int unsigned IDXW          = (NTEST > 1) ? $clog2(NTEST) : 1
) (
  input  logic                          clk,
  input  logic                          fclk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          meas_sel,
  output logic                          busy,
  output logic                          done,
  output logic                          pass,
  output logic [NTEST-1:0]              test_fail,
  output logic                          detect,
  output logic [C17_NPO-1:0]            det_fail,
  output logic [IDXW-1:0]               cur_test,
  output logic                          result_valid,
  output logic                          window,
  output logic [C17_NPO-1:0][CNT_W-1:0] det_count,
  output logic [CNT_W-1:0]              speed_count,
  output logic [CNT_W-1:0]              high_count,
  output logic [CNT_W-1:0]              low_count,
  output logic [C17_NPO-1:0]            po
);
  timeunit 1ps; timeprecision 1ps;

  logic [C17_NPI-1:0]               pattern, conn_en, inv, cut_in;
  logic [C17_NPI-1:0][C17_SELW-1:0] conn_sel;
  logic [C17_NPO-1:0]               observe;
  logic                             clear_n;
  logic                             meas_sig;

  or_test_controller #(
    .NTEST         (NTEST),
    .TESTS         (TESTS),
    .WIN_CYCLES    (WIN_CYCLES),
    .SETTLE_CYCLES (SETTLE_CYCLES),
    .IDXW          (IDXW)
  ) u_ctrl (
    .clk, .rst_n, .start, .detect,
    .pattern, .conn_en, .conn_sel, .inv, .observe,
    .clear_n, .window,
    .busy, .done, .pass, .result_valid, .cur_test, .test_fail
  );

  or_input_stage #(.NPI(C17_NPI), .NPO(C17_NPO), .SELW(C17_SELW)) u_in (
    .pattern, .conn_en, .conn_sel, .inv, .po, .cut_in
  );

  or_c17 #(
    .TRISE(TRISE), .TFALL(TFALL),
    .EXTRA_H(EXTRA_H), .EXTRA_I(EXTRA_I), .EXTRA_L(EXTRA_L),
    .EXTRA_O(EXTRA_O), .EXTRA_P(EXTRA_P), .EXTRA_Q(EXTRA_Q)
  ) u_cut (
    .pi (cut_in),
    .po (po)
  );

  or_output_stage #(.NPO(C17_NPO), .CNT_W(CNT_W)) u_out (
    .observe, .clear_n, .window, .po,
    .min_count (CNT_W'(MIN_COUNT)),
    .count     (det_count),
    .det_fail,
    .detect
  );

  assign meas_sig = meas_sel ? po[PO_Q] : po[PO_P];

  or_pulse_counter #(.CNT_W(CNT_W)) u_speed (
    .clear_n, .window, .sig (meas_sig), .count (speed_count)
  );

  or_duty_counter #(.CNT_W(CNT_W)) u_duty (
    .fclk, .clear_n, .window, .sig (meas_sig), .high_count, .low_count
  );
endmodule
