// or_c17: the ISCAS C17 benchmark circuit, used as the circuit under test of
// the oscillation ring test.
//
// Six two-input NAND gates. Line names follow the usual C17 drawing: primary
// inputs A..E, fanout stem C with branches F and G, stem I with branches J
// and K, stem L with branches M and N, primary outputs P and Q:
//   H = NAND(A,F)  I = NAND(G,D)  L = NAND(B,J)
//   O = NAND(K,E)  P = NAND(H,M)  Q = NAND(N,O)
// The netlist is the published C17; the delays are this design's addition.
// They are simulation-only propagation delays in ps (synthesis ignores
// them): every NAND switches its output up after TRISE and down after
// TFALL, plus the gate's own EXTRA_x. They give an oscillation ring closed
// through this circuit a finite period; unequal TRISE and TFALL make the
// ring's duty cycle differ from one half, and a nonzero EXTRA_x models a
// gate delay fault on gate x.
//
// Interface: pi = {E,D,C,B,A}, po = {Q,P}. Purely combinational.
module or_c17 #(
  parameter int unsigned TRISE   = 100,
  parameter int unsigned TFALL   = 100,
  parameter int unsigned EXTRA_H = 0,
  parameter int unsigned EXTRA_I = 0,
  parameter int unsigned EXTRA_L = 0,
  parameter int unsigned EXTRA_O = 0,
  parameter int unsigned EXTRA_P = 0,
  parameter int unsigned EXTRA_Q = 0
) (
  input  logic [4:0] pi,
  output logic [1:0] po
);
  timeunit 1ps; timeprecision 1ps;

  logic a, b, c, d, e;   // primary inputs
  logic f, g;            // branches of C
  wire  h, i, l, o;      // internal gate outputs (nets: they carry rise/fall delays)
  logic j, k;            // branches of I
  logic m, n;            // branches of L
  wire  p, q;            // primary outputs

  assign {e, d, c, b, a} = pi;

  assign f = c;
  assign g = c;
  assign j = i;
  assign k = i;
  assign m = l;
  assign n = l;

  assign #(TRISE + EXTRA_H, TFALL + EXTRA_H) h = ~(a & f);
  assign #(TRISE + EXTRA_I, TFALL + EXTRA_I) i = ~(g & d);
  assign #(TRISE + EXTRA_L, TFALL + EXTRA_L) l = ~(b & j);
  assign #(TRISE + EXTRA_O, TFALL + EXTRA_O) o = ~(k & e);
  assign #(TRISE + EXTRA_P, TFALL + EXTRA_P) p = ~(h & m);
  assign #(TRISE + EXTRA_Q, TFALL + EXTRA_Q) q = ~(n & o);

  assign po = {q, p};
endmodule
