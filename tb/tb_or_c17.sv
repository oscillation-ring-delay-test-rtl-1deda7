// tb_or_c17: self-checking test of the C17 circuit under test.
//
// Applies all 32 input combinations and compares P and Q with the two-level
// reference P = A&C | B&~(C&D), Q = ~(C&D)&(B|E), worked out by hand from the
// NAND netlist. Then checks the propagation time of the three-gate path
// C-G-I-K-O-Q: with every gate at its 100 ps default, Q must still hold its
// old value 290 ps after C changes and show the new one at 310 ps. A second
// copy with 30 ps rise, 70 ps fall and 50 ps extra on gate Q must take
// 70+30+120 = 220 ps when C rises and 30+70+80 = 180 ps when C falls.
module tb_or_c17;
  timeunit 1ps; timeprecision 1ps;

  logic [4:0] pi;
  logic [1:0] po, po2;
  int checks = 0, failures = 0;

  or_c17 dut (.pi, .po);
  or_c17 #(.TRISE(30), .TFALL(70), .EXTRA_Q(50)) dut2 (.pi, .po(po2));

  function automatic logic [1:0] ref_c17(input logic [4:0] v);
    logic a, b, c, d, e, p, q;
    {e, d, c, b, a} = v;
    p = (a & c) | (b & ~(c & d));
    q = ~(c & d) & (b | e);
    return {q, p};
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      pi = 5'(v);
      #1000;
      check(po == ref_c17(pi), $sformatf("pi=%05b po=%02b expected %02b", pi, po, ref_c17(pi)));
    end
    // path C-G-I-K-O-Q with A=1 B=0 D=1 E=1: Q = ~C after three gate delays
    pi = 5'b11001;          // C = 0 -> Q = 1
    #1000;
    check(po[1] == 1'b1, "Q before C rises");
    pi = 5'b11101;          // C = 1 -> Q = 0 after 300 ps
    #290;
    check(po[1] == 1'b1, "Q unchanged 290 ps after C rises");
    #20;
    check(po[1] == 1'b0, "Q changed 310 ps after C rises");
    #1000;
    pi = 5'b11001;          // C falls
    #175;
    check(po2[1] == 1'b0, "copy: Q unchanged 175 ps after C falls");
    #10;
    check(po2[1] == 1'b1, "copy: Q changed 185 ps after C falls");
    #1000;
    pi = 5'b11101;          // C rises
    #215;
    check(po2[1] == 1'b1, "copy: Q unchanged 215 ps after C rises");
    #10;
    check(po2[1] == 1'b0, "copy: Q changed 225 ps after C rises");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
