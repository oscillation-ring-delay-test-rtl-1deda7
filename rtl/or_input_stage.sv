// or_input_stage: multiplexer network with XOR gates in front of the circuit
// under test.
//
// For every primary input i the multiplexer chooses either the host's test
// pattern bit pattern[i] or, when conn_en[i] is set, the primary output
// po[conn_sel[i]]; the XOR after it inverts the chosen value when inv[i] is
// set. Connecting an output back to an input through an odd number of
// inversions closes an oscillation ring. The multiplexer-then-XOR order is the
// published organization; the select encoding is this design's own.
//
// Interface: NPI inputs, NPO outputs, SELW select bits per input.
// Timing: purely combinational, no clock.
module or_input_stage #(
  parameter int unsigned NPI  = 5,
  parameter int unsigned NPO  = 2,
  parameter int unsigned SELW = (NPO > 1) ? $clog2(NPO) : 1
) (
  input  logic [NPI-1:0]           pattern,
  input  logic [NPI-1:0]           conn_en,
  input  logic [NPI-1:0][SELW-1:0] conn_sel,
  input  logic [NPI-1:0]           inv,
  input  logic [NPO-1:0]           po,
  output logic [NPI-1:0]           cut_in
);
  timeunit 1ps; timeprecision 1ps;

  logic [NPI-1:0] mux_out;

  always_comb begin
    for (int unsigned ii = 0; ii < NPI; ii++) begin
      if (conn_en[ii] && (int'(conn_sel[ii]) < NPO))
        mux_out[ii] = po[conn_sel[ii]];
      else if (conn_en[ii])
        mux_out[ii] = 1'b0;           // select beyond the last output
      else
        mux_out[ii] = pattern[ii];
    end
  end

  assign cut_in = mux_out ^ inv;
endmodule
