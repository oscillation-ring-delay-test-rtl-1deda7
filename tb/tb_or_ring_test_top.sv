// tb_or_ring_test_top: end-to-end test of the oscillation ring test
// organization around C17.
//
// Two copies of the design share clock (800 ps), fast clock (20 ps) and
// start: dut at its defaults (every NAND 100 ps both ways) and dut_slow,
// whose NANDs rise in 80 ps and fall in 120 ps and whose gate I is 300 ps
// slower still, a gate delay fault. Each run applies the four-pattern set.
// Expected results, worked out from the C17 netlist and the gate delays:
//  * fault-free: every pattern passes. The ring of patterns 1 and 2 has two
//    gates (period 400 ps), of patterns 3 and 4 three gates (600 ps). Over the
//    64-cycle window (51.2 ns) the speed counter sees 51200/period pulses,
//    +-1, and the duty counter splits 2560 fast pulses evenly.
//  * slow gate I: the rings of patterns 3 and 4 pass through I, their period
//    (1200 ps) exceeds the clock period, so patterns 3 and 4 fail. In
//    pattern 4 P (fed back to D) stays high for I fall + L rise + P fall =
//    420+80+120 = 620 ps and low for 380+120+80 = 580 ps, so the duty
//    counter must read about 51200*620/1200/20 = 1323 and 1237 fast pulses.
//    The two-gate rings of patterns 1 and 2 stay symmetric (200/200 ps).
//  * stuck-at faults forced on internal lines: H stuck-at-1 fails patterns
//    1 and 3, I stuck-at-1 fails 3 and 4, O stuck-at-0 fails 1, 2 and 3.
// Every mechanism is counted and must occur at least once: a ring
// oscillating at speed, two rings at once, a secondary (not fed back) output
// observed oscillating, XOR inversion in the feedback, stuck-at detection,
// delay fault detection, speed and duty-cycle measurement, and a duty cycle
// that reveals unequal rising and falling path delays.
module tb_or_ring_test_top;
  timeunit 1ps; timeprecision 1ps;
  import or_pkg::*;

  localparam int unsigned TCLK = 800, TFAST = 20, WIN = 64;
  localparam int unsigned WIN_PS = WIN * TCLK;
  // ring period seen on P and on Q for each pattern, fault-free
  localparam int unsigned PER_P [4] = '{400, 400, 600, 600};
  localparam int unsigned PER_Q [4] = '{400, 400, 600, 600};

  logic clk = 0, fclk = 0, rst_n, start, meas_sel;
  always #(TCLK / 2)  clk  = ~clk;
  always #(TFAST / 2) fclk = ~fclk;

  logic        busy, done, pass, detect, result_valid, window;
  logic [3:0]  test_fail;
  logic [1:0]  cur_test, det_fail, po;
  logic [1:0][15:0] det_count;
  logic [15:0] speed_count, high_count, low_count;

  logic        s_busy, s_done, s_pass, s_detect, s_result_valid, s_window;
  logic [3:0]  s_test_fail;
  logic [1:0]  s_cur_test, s_det_fail, s_po;
  logic [1:0][15:0] s_det_count;
  logic [15:0] s_speed_count, s_high_count, s_low_count;

  or_ring_test_top dut (
    .clk, .fclk, .rst_n, .start, .meas_sel,
    .busy, .done, .pass, .test_fail, .detect, .det_fail, .cur_test, .result_valid,
    .window, .det_count, .speed_count, .high_count, .low_count, .po
  );

  or_ring_test_top #(.TRISE(80), .TFALL(120), .EXTRA_I(300)) dut_slow (
    .clk, .fclk, .rst_n, .start, .meas_sel,
    .busy(s_busy), .done(s_done), .pass(s_pass), .test_fail(s_test_fail),
    .detect(s_detect), .det_fail(s_det_fail), .cur_test(s_cur_test),
    .result_valid(s_result_valid), .window(s_window), .det_count(s_det_count),
    .speed_count(s_speed_count), .high_count(s_high_count), .low_count(s_low_count),
    .po(s_po)
  );

  int checks = 0, failures = 0;
  int n_ring_ok = 0, n_two_rings = 0, n_secondary = 0, n_xor_inv = 0;
  int n_stuck = 0, n_delay = 0, n_speed = 0, n_duty = 0, n_duty_asym = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One pass of the test set. fault_free: the default copy has no forced
  // fault, so its counts are checked against the ring periods.
  task automatic run(input logic sel, input logic fault_free,
                     input logic [3:0] x_fail, input logic [3:0] x_fail_slow);
    int p, exp_cnt, per, tot;
    meas_sel = sel;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      @(negedge clk);
      if (result_valid) begin
        p = int'(cur_test);
        check((det_fail != 2'b00) == x_fail[p] && detect == x_fail[p],
              $sformatf("pattern %0d det_fail=%b detect=%b expected fail=%b", p, det_fail, detect, x_fail[p]));
        check((det_fail & ~C17_TESTS[p].observe) == 2'b00, $sformatf("pattern %0d inactive detector failed", p));
        if (fault_free) begin
          for (int o = 0; o < 2; o++) begin
            if (C17_TESTS[p].observe[o]) begin
              check(det_count[o] >= 16'(WIN - 1), $sformatf("p%0d out%0d count %0d", p, o, det_count[o]));
              n_ring_ok++;
            end else
              check(det_count[o] == 0, $sformatf("p%0d out%0d not activated but counted", p, o));
          end
          // outputs observed but not fed back: secondary paths
          if ((p == 1 || p == 2) && det_fail == 2'b00) n_secondary++;
          if (p == 0 && det_fail == 2'b00 && det_count[0] >= 63 && det_count[1] >= 63) n_two_rings++;
          per = sel ? PER_Q[p] : PER_P[p];
          exp_cnt = int'(WIN_PS / per);
          check(int'(speed_count) >= exp_cnt - 1 && int'(speed_count) <= exp_cnt + 1,
                $sformatf("p%0d speed_count=%0d expected %0d+-1", p, speed_count, exp_cnt));
          n_speed++;
          tot = int'(high_count) + int'(low_count);
          check(tot >= int'(WIN_PS / TFAST) - 2 && tot <= int'(WIN_PS / TFAST) + 2,
                $sformatf("p%0d high+low=%0d", p, tot));
          check(int'(high_count) - int'(low_count) <= 12 && int'(low_count) - int'(high_count) <= 12,
                $sformatf("p%0d duty high=%0d low=%0d", p, high_count, low_count));
          n_duty++;
        end
        check(s_result_valid, "both copies report together");
        if (p <= 1) begin
          check(int'(s_speed_count) >= 127 && int'(s_speed_count) <= 129,
                $sformatf("slow copy p%0d speed_count=%0d", p, s_speed_count));
          check(int'(s_high_count) - int'(s_low_count) <= 12 && int'(s_low_count) - int'(s_high_count) <= 12,
                $sformatf("slow copy p%0d duty %0d/%0d", p, s_high_count, s_low_count));
        end
        if (p == 3 && !sel) begin
          check(int'(s_high_count) >= 1323 - 35 && int'(s_high_count) <= 1323 + 35 &&
                int'(s_low_count) >= 1237 - 35 && int'(s_low_count) <= 1237 + 35,
                $sformatf("slow copy p3 duty high=%0d low=%0d expected ~1323/1237", s_high_count, s_low_count));
          if (int'(s_high_count) - int'(s_low_count) >= 40) n_duty_asym++;
        end
      end
      if (dut.u_ctrl.window && dut.u_ctrl.inv != 0) n_xor_inv++;
    end
    check(test_fail == x_fail, $sformatf("test_fail=%b expected %b", test_fail, x_fail));
    check(pass == (x_fail == 0), "pass flag");
    check(s_done && s_test_fail == x_fail_slow,
          $sformatf("slow copy test_fail=%b expected %b", s_test_fail, x_fail_slow));
    if (x_fail != 0) n_stuck++;
    if (s_test_fail != 0 && x_fail == 0) n_delay++;
  endtask

  initial begin
    rst_n = 0; start = 0; meas_sel = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // fault-free, measuring P then Q; the slow copy fails patterns 3 and 4
    run(1'b0, 1'b1, 4'b0000, 4'b1100);
    run(1'b1, 1'b1, 4'b0000, 4'b1100);
    // stuck-at faults on the default copy
    force dut.u_cut.h = 1'b1;
    run(1'b0, 1'b0, 4'b0101, 4'b1100);
    release dut.u_cut.h;
    force dut.u_cut.i = 1'b1;
    run(1'b0, 1'b0, 4'b1100, 4'b1100);
    release dut.u_cut.i;
    force dut.u_cut.o = 1'b0;
    run(1'b0, 1'b0, 4'b0111, 4'b1100);
    release dut.u_cut.o;
    // and clean again
    run(1'b0, 1'b1, 4'b0000, 4'b1100);

    $display("mechanisms: ring_ok=%0d two_rings=%0d secondary=%0d xor_inv=%0d stuck=%0d delay=%0d speed=%0d duty=%0d duty_asym=%0d",
             n_ring_ok, n_two_rings, n_secondary, n_xor_inv, n_stuck, n_delay, n_speed, n_duty, n_duty_asym);
    check(n_ring_ok > 0,   "no ring oscillated at speed");
    check(n_two_rings > 0, "two rings never ran together");
    check(n_secondary > 0, "no secondary output observed");
    check(n_xor_inv > 0,   "XOR inversion never used");
    check(n_stuck > 0,     "no stuck-at fault detected");
    check(n_delay > 0,     "no delay fault detected");
    check(n_speed > 0,     "no speed measurement");
    check(n_duty > 0,      "no duty-cycle measurement");
    check(n_duty_asym > 0, "unequal rise/fall delays never measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
