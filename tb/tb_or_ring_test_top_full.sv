// tb_or_ring_test_top_full: one complete test-set run of the oscillation
// ring test organization with every parameter at its default.
//
// Clock 800 ps, fast clock 20 ps. The fault-free C17 must pass all four
// patterns, with every activated detector counting at least 63 ring edges in
// the 64-cycle window and the speed counter on P seeing 51200/period pulses
// (+-1), period 400 ps for patterns 1-2 and 600 ps for 3-4. A second run
// forces line H stuck-at-1, which must fail exactly patterns 1 and 3.
// Also checks the per-pattern cycle count, 2*4 + 64 + 1 = 73 clock cycles.
module tb_or_ring_test_top_full;
  timeunit 1ps; timeprecision 1ps;
  import or_pkg::*;

  localparam int unsigned TCLK = 800, TFAST = 20, WIN = 64, PER = 73;
  localparam int unsigned PER_P [4] = '{400, 400, 600, 600};

  logic clk = 0, fclk = 0, rst_n, start, meas_sel;
  always #(TCLK / 2)  clk  = ~clk;
  always #(TFAST / 2) fclk = ~fclk;

  logic        busy, done, pass, detect, result_valid, window;
  logic [3:0]  test_fail;
  logic [1:0]  cur_test, det_fail, po;
  logic [1:0][15:0] det_count;
  logic [15:0] speed_count, high_count, low_count;

  or_ring_test_top dut (
    .clk, .fclk, .rst_n, .start, .meas_sel,
    .busy, .done, .pass, .test_fail, .detect, .det_fail, .cur_test, .result_valid,
    .window, .det_count, .speed_count, .high_count, .low_count, .po
  );

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic fault_free, input logic [3:0] x_fail);
    int p, exp_cnt, cyc, last;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1; last = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (result_valid) begin
        p = int'(cur_test);
        check(cyc - last == PER, $sformatf("p%0d took %0d cycles", p, cyc - last));
        last = cyc;
        check((det_fail != 2'b00) == x_fail[p], $sformatf("p%0d det_fail=%b", p, det_fail));
        if (fault_free) begin
          for (int o = 0; o < 2; o++)
            if (C17_TESTS[p].observe[o])
              check(det_count[o] >= 16'(WIN - 1), $sformatf("p%0d out%0d count %0d", p, o, det_count[o]));
          exp_cnt = int'(WIN * TCLK / PER_P[p]);
          check(int'(speed_count) >= exp_cnt - 1 && int'(speed_count) <= exp_cnt + 1,
                $sformatf("p%0d speed_count=%0d expected %0d", p, speed_count, exp_cnt));
          check(int'(high_count) + int'(low_count) >= int'(WIN * TCLK / TFAST) - 2,
                $sformatf("p%0d duty counts %0d/%0d", p, high_count, low_count));
        end
      end
    end
    check(test_fail == x_fail, $sformatf("test_fail=%b expected %b", test_fail, x_fail));
    check(pass == (x_fail == 0), "pass flag");
  endtask

  initial begin
    rst_n = 0; start = 0; meas_sel = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(1'b1, 4'b0000);
    force dut.u_cut.h = 1'b1;
    run(1'b0, 4'b0101);
    release dut.u_cut.h;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
