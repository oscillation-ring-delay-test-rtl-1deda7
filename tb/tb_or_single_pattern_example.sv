// tb_or_single_pattern_example: the single-pattern oscillation ring example.
//
// Pattern (A,B,C,D,E) = (0,1,P,1,0): output P is fed straight back to input
// C (the path C-G-I-J-L-M-P has three NANDs, odd parity), and both outputs
// are observed, since the compatible path C-G-I-J-L-N-Q oscillates too.
// Worked out from the netlist:
//  * detected: both stuck-at faults on the sensitized lines C G I J L M N P Q
//    (18) and the stuck-at-0 faults B, D, H, O that remove a non-controlling
//    side input (4): 22 faults;
//  * not detectable, must pass: A0 B1 D1 E0 H1 O1 (value already there) and
//    both faults on F and K, whose gates are blocked by A=0 and E=0: 10;
//  * A stuck-at-1 and E stuck-at-1 turn H (or O) into a copy of the ring
//    that blocks it every other half period; they are reported, not checked.
// Gate delay faults (EXTRA ps on one gate) on the ring gates I, L, P and on
// Q must be detected; on the side gates H and O they must not.
module tb_or_single_pattern_example;
  timeunit 1ps; timeprecision 1ps;
  import or_pkg::*;

  localparam int unsigned TCLK = 800, TFAST = 20, EXTRA = 300;
  localparam string LINE_NAMES = "ABCDEFGHIJKLMNOPQ";
  localparam or_test_t EXAMPLE [1] = '{
    '{conn_en: 5'b00100, conn_sel: 5'b00000, path_par: 5'b00100, pattern: 5'b01010, observe: 2'b11}
  };
  // 1 = must be detected, 0 = must pass, per line, stuck-at-0 and stuck-at-1
  localparam logic [16:0] MUST_SA0 = 17'b1_1111_1011_1100_1110; // Q..A
  localparam logic [16:0] MUST_SA1 = 17'b1_1011_1011_0100_0100;
  localparam logic [16:0] SKIP_SA1 = 17'b0_0000_0000_0001_0001; // A1, E1

  logic clk = 0, fclk = 0, rst_n, start;
  always #(TCLK / 2)  clk  = ~clk;
  always #(TFAST / 2) fclk = ~fclk;

  logic       done, pass;
  logic [0:0] test_fail;
  logic [1:0][15:0] det_count;
  logic [5:0][0:0] slow_fail;

  or_ring_test_top #(.NTEST(1), .TESTS(EXAMPLE)) dut (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done, .pass, .test_fail, .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count, .speed_count(),
    .high_count(), .low_count(), .po()
  );

  or_ring_test_top #(.NTEST(1), .TESTS(EXAMPLE), .EXTRA_H(EXTRA)) dut_slow_h (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[0]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );

  or_ring_test_top #(.NTEST(1), .TESTS(EXAMPLE), .EXTRA_I(EXTRA)) dut_slow_i (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[1]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );

  or_ring_test_top #(.NTEST(1), .TESTS(EXAMPLE), .EXTRA_L(EXTRA)) dut_slow_l (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[2]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );

  or_ring_test_top #(.NTEST(1), .TESTS(EXAMPLE), .EXTRA_O(EXTRA)) dut_slow_o (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[3]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );

  or_ring_test_top #(.NTEST(1), .TESTS(EXAMPLE), .EXTRA_P(EXTRA)) dut_slow_p (
    .clk, .fclk, .rst_n, .start, .meas_sel(1'b0),
    .busy(), .done(), .pass(), .test_fail(slow_fail[4]), .detect(), .det_fail(),
    .cur_test(), .result_valid(), .window(), .det_count(), .speed_count(),
    .high_count(), .low_count(), .po()
  );

  or_ring_test_top #(.NTEST(1), .TESTS(EXAMPLE), .EXTRA_Q(EXTRA)) dut_slow_q (
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
    #100_000_000;
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
    logic must;
    rst_n = 0; start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_set();
    check(pass, "fault-free example passes");
    check(det_count[0] >= 63 && det_count[1] >= 63, "P and Q both oscillate (primary and secondary path)");
    for (int g = 0; g < 6; g++)
      check(slow_fail[g][0] == (g != 0 && g != 3),
            $sformatf("gate delay fault on %s: detected=%b", gates.substr(g, g), slow_fail[g][0]));
    for (int l = 0; l < 17; l++) begin
      for (int v = 0; v < 2; v++) begin
        inject(l, 1'(v));
        run_set();
        if (test_fail[0]) detected++;
        if (v == 1 && SKIP_SA1[l])
          $display("%s stuck-at-1 (dynamic blocking): detected=%b", LINE_NAMES.substr(l, l), test_fail[0]);
        else begin
          must = v ? MUST_SA1[l] : MUST_SA0[l];
          check(test_fail[0] == must,
                $sformatf("%s stuck-at-%0d detected=%b expected %b", LINE_NAMES.substr(l, l), v, test_fail[0], must));
        end
        remove(l);
      end
    end
    $display("stuck-at faults detected by the one pattern: %0d of 34", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
