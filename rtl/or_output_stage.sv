// or_output_stage: the detectors on the primary outputs and the OR gate that
// merges them into one detection signal.
//
// One or_detector per primary output. The controller activates, per test
// pattern, the detectors of the outputs it observes (observe); detect is the
// OR of the activated detectors' fail flags. This is the published output
// stage; the per-detector counts are brought out as well so that the host
// can read the measured oscillation rates.
//
// Interface: observe, clear_n, window, po, min_count; count, det_fail, detect.
// Timing: as or_detector; detect is valid after the window has closed.
module or_output_stage #(
  parameter int unsigned NPO   = 2,
  parameter int unsigned CNT_W = 16
) (
  input  logic [NPO-1:0]            observe,
  input  logic                      clear_n,
  input  logic                      window,
  input  logic [NPO-1:0]            po,
  input  logic [CNT_W-1:0]          min_count,
  output logic [NPO-1:0][CNT_W-1:0] count,
  output logic [NPO-1:0]            det_fail,
  output logic                      detect
);
  timeunit 1ps; timeprecision 1ps;

  for (genvar gi = 0; gi < NPO; gi++) begin : g_det
    or_detector #(.CNT_W(CNT_W)) u_det (
      .en        (observe[gi]),
      .clear_n   (clear_n),
      .window    (window),
      .sig       (po[gi]),
      .min_count (min_count),
      .count     (count[gi]),
      .fail      (det_fail[gi])
    );
  end

  assign detect = |det_fail;
endmodule
