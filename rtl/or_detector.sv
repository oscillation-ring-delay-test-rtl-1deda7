// or_detector: oscillation detector on one primary output of the circuit
// under test.
//
// A transition counter (or_pulse_counter) counts the rising edges of the
// output while the window is open. When the detector is activated (en) and
// the count is below min_count, the output did not oscillate at the required
// rate and fail is raised. With a window of W clock cycles and min_count =
// W-1, a ring whose period exceeds one clock cycle fails: that is how a gate
// or path delay fault, and any fault that stops the ring, is detected. The
// transition-counting detector follows the published organization; the
// threshold compare is this design's own.
//
// Interface: en, clear_n, window, sig, min_count; count, fail.
// Timing: fail is combinational from count; it is valid once the window has
// closed and the count has settled.
module or_detector #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             en,
  input  logic             clear_n,
  input  logic             window,
  input  logic             sig,
  input  logic [CNT_W-1:0] min_count,
  output logic [CNT_W-1:0] count,
  output logic             fail
);
  timeunit 1ps; timeprecision 1ps;

  or_pulse_counter #(.CNT_W(CNT_W)) u_cnt (
    .clear_n (clear_n),
    .window  (window & en),
    .sig     (sig),
    .count   (count)
  );

  assign fail = en && (count < min_count);
endmodule
