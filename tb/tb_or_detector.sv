// tb_or_detector: self-checking test of the oscillation detector.
//
// For random pulse counts around the threshold, with the detector activated
// or not, checks the counted transitions and that fail is raised exactly
// when the detector is activated and fewer than min_count edges arrived,
// including the boundary cases count == min_count and min_count-1.
module tb_or_detector;
  timeunit 1ps; timeprecision 1ps;

  logic        en, clear_n, window, sig, fail;
  logic [15:0] min_count, count;
  int checks = 0, failures = 0;

  or_detector dut (.en, .clear_n, .window, .sig, .min_count, .count, .fail);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, m;
    sig = 0; window = 0; clear_n = 1; en = 0; min_count = 0;
    #50;
    for (int t = 0; t < 60; t++) begin
      m = 5 + int'($urandom_range(20));
      case (t % 4)
        0: n = m;
        1: n = m - 1;
        default: n = int'($urandom_range(30));
      endcase
      en = (t % 5) != 4;
      min_count = 16'(m);
      clear_n = 0; #20 clear_n = 1;
      #10 window = 1;
      repeat (n) begin
        #25 sig = 1; #25 sig = 0;
      end
      #10 window = 0;
      #10;
      check(count == (en ? 16'(n) : 16'd0), $sformatf("count=%0d expected %0d", count, en ? n : 0));
      check(fail == (en && n < m), $sformatf("en=%0b n=%0d min=%0d fail=%0b", en, n, m, fail));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
