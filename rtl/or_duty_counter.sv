// or_duty_counter: duty-cycle measurement of an oscillation waveform.
//
// A fast pulse train (fclk) is counted separately while the waveform is 1
// (high_count) and while it is 0 (low_count), both only inside the window T.
// Since the rising and falling delays of a path differ, the two counts give
// the two half periods of the ring, i.e. the falling and the rising delay of
// the sensitized path, in units of the fast period. The two gated counters
// follow the published configuration. Here the gating is done as counter
// enables in the fclk domain, after a two-flop synchronizer on sig and window
// (this design's choice, which counts the same pulses two fclk cycles later).
//
// Interface: fclk, clear_n (async), window, sig; high_count, low_count.
// Timing: counts are in the fclk domain and hold once the window is closed.
module or_duty_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             fclk,
  input  logic             clear_n,
  input  logic             window,
  input  logic             sig,
  output logic [CNT_W-1:0] high_count,
  output logic [CNT_W-1:0] low_count
);
  timeunit 1ps; timeprecision 1ps;

  logic [1:0] sig_s, win_s;

  always_ff @(posedge fclk or negedge clear_n) begin
    if (!clear_n) begin
      sig_s      <= '0;
      win_s      <= '0;
      high_count <= '0;
      low_count  <= '0;
    end else begin
      sig_s <= {sig_s[0], sig};
      win_s <= {win_s[0], window};
      if (win_s[1] && sig_s[1] && high_count != '1)
        high_count <= high_count + 1'b1;
      if (win_s[1] && !sig_s[1] && low_count != '1)
        low_count <= low_count + 1'b1;
    end
  end
endmodule
