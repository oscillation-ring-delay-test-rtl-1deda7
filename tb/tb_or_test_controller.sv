// tb_or_test_controller: self-checking test of the test controller (host).
//
// Runs the default four-pattern C17 test set twice with a short window
// (WIN_CYCLES=8, SETTLE_CYCLES=2). A behavioural output stage raises detect
// after the window for the patterns chosen to "fail" in each run. Checks,
// cycle by cycle: the test conditions driven for each pattern against the
// table written out here by hand (XOR control = connected and even path
// parity), the counters held cleared in APPLY, the window length, the
// result strobe, the recorded per-pattern results, done/pass, and the total
// of 4*(2*SETTLE+WIN+1) cycles per run.
module tb_or_test_controller;
  timeunit 1ps; timeprecision 1ps;
  import or_pkg::*;

  localparam int unsigned WIN = 8, SET = 2, PER = 2 * SET + WIN + 1;

  logic clk = 0, rst_n, start, detect;
  logic [4:0]      pattern, conn_en, inv;
  logic [4:0][0:0] conn_sel;
  logic [1:0]      observe;
  logic            clear_n, window, busy, done, pass, result_valid;
  logic [1:0]      cur_test;
  logic [3:0]      test_fail;
  int checks = 0, failures = 0;

  or_test_controller #(.WIN_CYCLES(WIN), .SETTLE_CYCLES(SET)) dut (
    .clk, .rst_n, .start, .detect,
    .pattern, .conn_en, .conn_sel, .inv, .observe,
    .clear_n, .window, .busy, .done, .pass, .result_valid, .cur_test, .test_fail
  );

  always #500 clk = ~clk;

  // expected test conditions, one row per pattern
  logic [4:0] x_conn [4] = '{5'b10001, 5'b00010, 5'b00100, 5'b01000};
  logic [4:0] x_sel  [4] = '{5'b10000, 5'b00000, 5'b00100, 5'b00000};
  logic [4:0] x_inv  [4] = '{5'b10001, 5'b00010, 5'b00000, 5'b00000};
  logic [4:0] x_pat  [4] = '{5'b00100, 5'b00000, 5'b11001, 5'b00110};
  logic [1:0] x_obs  [4] = '{2'b11, 2'b11, 2'b11, 2'b01};

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

  task automatic run(input logic [3:0] fail_mask);
    int cyc, win_len, win_start;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1; win_len = 0; win_start = -1;
    for (int p = 0; p < 4; p++) begin
      for (int c = 0; c < PER; c++) begin
        // now in cycle c of pattern p (sampled mid-cycle)
        check(busy && cur_test == 2'(p), $sformatf("p%0d c%0d busy/cur_test", p, c));
        check(pattern == x_pat[p] && conn_en == x_conn[p] && conn_sel == x_sel[p] &&
              inv == x_inv[p] && observe == x_obs[p],
              $sformatf("p%0d test conditions pat=%b conn=%b sel=%b inv=%b obs=%b",
                        p, pattern, conn_en, conn_sel, inv, observe));
        check(clear_n == (c >= SET), $sformatf("p%0d c%0d clear_n=%b", p, c, clear_n));
        check(window == (c >= SET && c < SET + WIN), $sformatf("p%0d c%0d window=%b", p, c, window));
        check(result_valid == (c == PER - 1), $sformatf("p%0d c%0d result_valid", p, c));
        detect = (c >= SET + WIN) && fail_mask[p];
        @(negedge clk);
        cyc++;
      end
    end
    check(done && !busy, "done after 4 patterns");
    check(test_fail == fail_mask, $sformatf("test_fail=%b expected %b", test_fail, fail_mask));
    check(pass == (fail_mask == 0), "pass");
    check(cyc == 4 * PER + 1, $sformatf("cycles=%0d", cyc));
    repeat (3) @(negedge clk);
    check(done && test_fail == fail_mask, "done holds");
  endtask

  initial begin
    rst_n = 0; start = 0; detect = 0;
    repeat (3) @(negedge clk);
    check(!busy && !done && !window && conn_en == 0, "idle after reset");
    rst_n = 1;
    @(negedge clk);
    run(4'b0000);
    run(4'b1010);
    run(4'b0101);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
