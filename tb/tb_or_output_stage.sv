// tb_or_output_stage: self-checking test of the detector bank and OR gate.
//
// Two outputs receive different random numbers of pulses in the window;
// for every activation mask the testbench checks each detector's count and
// fail flag and that detect is the OR of the activated detectors' fails.
module tb_or_output_stage;
  timeunit 1ps; timeprecision 1ps;

  logic [1:0]       observe, po, det_fail;
  logic             clear_n, window, detect;
  logic [15:0]      min_count;
  logic [1:0][15:0] count;
  int checks = 0, failures = 0;

  or_output_stage dut (.observe, .clear_n, .window, .po, .min_count, .count, .det_fail, .detect);

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
    int n0, n1, mx;
    logic f0, f1;
    po = 0; window = 0; clear_n = 1; observe = 0; min_count = 16'd10;
    #50;
    for (int t = 0; t < 40; t++) begin
      n0 = int'($urandom_range(20));
      n1 = int'($urandom_range(20));
      observe = 2'(t);
      clear_n = 0; #20 clear_n = 1;
      #10 window = 1;
      mx = (n0 > n1) ? n0 : n1;
      for (int k = 0; k < mx; k++) begin
        #20 po = {1'(k < n1), 1'(k < n0)};
        #20 po = 2'b00;
      end
      #10 window = 0;
      #10;
      f0 = observe[0] && (n0 < 10);
      f1 = observe[1] && (n1 < 10);
      check(count[0] == (observe[0] ? 16'(n0) : 16'd0), $sformatf("count0=%0d n0=%0d", count[0], n0));
      check(count[1] == (observe[1] ? 16'(n1) : 16'd0), $sformatf("count1=%0d n1=%0d", count[1], n1));
      check(det_fail == {f1, f0}, $sformatf("det_fail=%02b expected %b%b", det_fail, f1, f0));
      check(detect == (f0 | f1), $sformatf("detect=%b expected %b", detect, f0 | f1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
