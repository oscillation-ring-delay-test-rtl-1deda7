// or_pkg: shared sizes, types and the default test set of the oscillation ring
// test organization for the C17 example circuit.
//
// An oscillation ring test pattern ("test condition") records, for every
// primary input of the circuit under test, whether it is fed back from a
// primary output (and from which one), the inversion parity of the sensitized
// path that closes the ring, the static value applied to the inputs that are
// not fed back, and which primary outputs are observed by a detector.
// Bit i of every per-input vector belongs to input i of C17 (0=A .. 4=E);
// bit j of a per-output vector belongs to output j (0=P, 1=Q).
//
// The default test set C17_TESTS is the four-pattern complete oscillation ring
// test for C17 (stuck-at and gate delay faults). Each row has been checked by
// evaluating C17 under the pattern: the listed input, driven from the listed
// output through the listed path parity plus one XOR inversion when the path
// parity is even, always forms a ring with odd total inversion. Don't-care
// pattern bits are applied as 0 (this design's choice).
package or_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned C17_NPI  = 5;  // A, B, C, D, E
  localparam int unsigned C17_NPO  = 2;  // P, Q
  localparam int unsigned C17_SELW = 1;  // bits to select one of the outputs

  // Output positions.
  localparam int unsigned PO_P = 0, PO_Q = 1;

  typedef struct packed {
    logic [C17_NPI-1:0]               conn_en;  // input is fed back from an output
    logic [C17_NPI-1:0][C17_SELW-1:0] conn_sel; // which output feeds it
    logic [C17_NPI-1:0]               path_par; // inversion parity of the ring's path (1 = odd)
    logic [C17_NPI-1:0]               pattern;  // static values of the other inputs
    logic [C17_NPO-1:0]               observe;  // detectors activated
  } or_test_t;

  localparam int unsigned C17_NTEST = 4;

  //                          conn_en    conn_sel(E..A)  path_par   pattern    observe
  localparam or_test_t C17_TESTS [C17_NTEST] = '{
    // 1: A <- P, E <- Q, both paths even; B=0 C=1 D=0; observe P,Q
    '{conn_en: 5'b10001, conn_sel: 5'b10000, path_par: 5'b00000, pattern: 5'b00100, observe: 2'b11},
    // 2: B <- P, path even; A=0 C=x D=0 E=0; observe P,Q
    '{conn_en: 5'b00010, conn_sel: 5'b00000, path_par: 5'b00000, pattern: 5'b00000, observe: 2'b11},
    // 3: C <- Q, path odd; A=1 B=0 D=1 E=1; observe P,Q
    '{conn_en: 5'b00100, conn_sel: 5'b00100, path_par: 5'b00100, pattern: 5'b11001, observe: 2'b11},
    // 4: D <- P, path odd; A=0 B=1 C=1 E=x; observe P only
    '{conn_en: 5'b01000, conn_sel: 5'b00000, path_par: 5'b01000, pattern: 5'b00110, observe: 2'b01}
  };
endpackage
