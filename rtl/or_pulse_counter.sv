// or_pulse_counter: counts the pulses of an oscillation waveform inside a
// time slot T (the speed measurement counter).
//
// The waveform sig is ANDed with the window signal and the result clocks a
// counter, so the counter advances once per rising edge of sig while window
// is high. The count over a window of known length gives the ring's
// frequency, and so the delay of the sensitized path. The AND-gated counter is
// the published configuration; the asynchronous active-low clear and the
// saturation at all ones are this design's choices.
//
// Interface: clear_n (async, from the controller), window, sig; count.
// Timing: count is in the domain of sig. It stops changing once window is
// low, so a reader in another clock domain samples it a few cycles after
// closing the window.
module or_pulse_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clear_n,
  input  logic             window,
  input  logic             sig,
  output logic [CNT_W-1:0] count
);
  timeunit 1ps; timeprecision 1ps;

  logic gated;
  assign gated = sig & window;

  always_ff @(posedge gated or negedge clear_n) begin
    if (!clear_n)
      count <= '0;
    else if (count != '1)
      count <= count + 1'b1;
  end
endmodule
