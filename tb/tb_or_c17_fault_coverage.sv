// tb_or_c17_fault_coverage: fault coverage of the complete four-pattern
// oscillation ring test of C17.
//
// The four patterns are meant to detect every single stuck-at fault and
// every gate delay fault of C17. This testbench checks that claim on the
// design: for each of the 17 lines A..Q it forces the line stuck-at-0 and
// then stuck-at-1 inside the circuit under test and runs the whole test set,
// which must flag at least one pattern (34 faults). Six more copies of the
// design each carry one gate made EXTRA ps slower (a gate delay fault on H,
// I, L, O, P or Q); each of them must fail at least one pattern, while the
// fault-free run must pass. Clock 800 ps, gates 100 ps.
module tb_or_c17_fault_coverage;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned TCLK = 800, TFAST = 20, EXTRA = 300;
  localparam string LINE_NAMES = "ABCDEFGHIJKLMNOPQ";

  logic clk = 0, fclk = 0, rst_n, start;
  always #(TCLK / 2)  clk  = ~clk;
  always #(TFAST / 2) fclk = ~fclk;

  logic       done, pass;
  logic [3:0] test_fail;
  logic [5:0][3:0] slow_fail;

  or_ring_test_top dut (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done, .pass, .test_fail, .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );

  or_ring_test_top #(.EXTRA_H(EXTRA)) dut_slow_h (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[0]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );
  or_ring_test_top #(.EXTRA_I(EXTRA)) dut_slow_i (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[1]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );
  or_ring_test_top #(.EXTRA_L(EXTRA)) dut_slow_l (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[2]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );
  or_ring_test_top #(.EXTRA_O(EXTRA)) dut_slow_o (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[3]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );
  or_ring_test_top #(.EXTRA_P(EXTRA)) dut_slow_p (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[4]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );
  or_ring_test_top #(.EXTRA_Q(EXTRA)) dut_slow_q (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[5]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );

  int checks = 0, failures = 0, detected = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic inject(input int line, input logic v);
    case (line)
      0: if (v) force dut.u_cut.a = 1'b1; else force dut.u_cut.a = 1'b0;
      1: if (v) force dut.u_cut.b = 1'b1; else force dut.u_cut.b = 1'b0;
      2: if (v) force dut.u_cut.c = 1'b1; else force dut.u_cut.c = 1'b0;
      3: if (v) force dut.u_cut.d = 1'b1; else force dut.u_cut.d = 1'b0;
      4: if (v) force dut.u_cut.e = 1'b1; else force dut.u_cut.e = 1'b0;
      5: if (v) force dut.u_cut.f = 1'b1; else force dut.u_cut.f = 1'b0;
      6: if (v) force dut.u_cut.g = 1'b1; else force dut.u_cut.g = 1'b0;
      7: if (v) force dut.u_cut.h = 1'b1; else force dut.u_cut.h = 1'b0;
      8: if (v) force dut.u_cut.i = 1'b1; else force dut.u_cut.i = 1'b0;
      9: if (v) force dut.u_cut.j = 1'b1; else force dut.u_cut.j = 1'b0;
      10: if (v) force dut.u_cut.k = 1'b1; else force dut.u_cut.k = 1'b0;
      11: if (v) force dut.u_cut.l = 1'b1; else force dut.u_cut.l = 1'b0;
      12: if (v) force dut.u_cut.m = 1'b1; else force dut.u_cut.m = 1'b0;
      13: if (v) force dut.u_cut.n = 1'b1; else force dut.u_cut.n = 1'b0;
      14: if (v) force dut.u_cut.o = 1'b1; else force dut.u_cut.o = 1'b0;
      15: if (v) force dut.u_cut.p = 1'b1; else force dut.u_cut.p = 1'b0;
      16: if (v) force dut.u_cut.q = 1'b1; else force dut.u_cut.q = 1'b0;
      default: ;
    endcase
  endtask

  task automatic remove(input int line);
    case (line)
      0: release dut.u_cut.a;
      1: release dut.u_cut.b;
      2: release dut.u_cut.c;
      3: release dut.u_cut.d;
      4: release dut.u_cut.e;
      5: release dut.u_cut.f;
      6: release dut.u_cut.g;
      7: release dut.u_cut.h;
      8: release dut.u_cut.i;
      9: release dut.u_cut.j;
      10: release dut.u_cut.k;
      11: release dut.u_cut.l;
      12: release dut.u_cut.m;
      13: release dut.u_cut.n;
      14: release dut.u_cut.o;
      15: release dut.u_cut.p;
      16: release dut.u_cut.q;
      default: ;
    endcase
  endtask

  task automatic run_set();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    string gates = "HILOPQ";
    rst_n = 0; start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_set();
    check(pass && test_fail == 4'b0000, "fault-free C17 passes");
    for (int g = 0; g < 6; g++) begin
      check(slow_fail[g] != 4'b0000,
            $sformatf("gate delay fault on %s not detected", gates.substr(g, g)));
      if (slow_fail[g] != 4'b0000) detected++;
    end
    for (int l = 0; l < 17; l++) begin
      for (int v = 0; v < 2; v++) begin
        inject(l, 1'(v));
        run_set();
        check(!pass && test_fail != 4'b0000,
              $sformatf("%s stuck-at-%0d not detected", LINE_NAMES.substr(l, l), v));
        if (test_fail != 4'b0000) detected++;
        $display("%s stuck-at-%0d: failing patterns (4..1) %b", LINE_NAMES.substr(l, l), v, test_fail);
        remove(l);
      end
    end
    $display("faults detected: %0d of 40 (34 stuck-at, 6 gate delay)", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
