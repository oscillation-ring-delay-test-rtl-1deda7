// tb_or_pulse_counter: self-checking test of the gated pulse counter.
//
// Generates bursts of pulses on sig, some inside and some outside the
// window, and checks that exactly the rising edges inside the window are
// counted, that the count holds after the window closes, that clear_n
// resets it, and (on a 4-bit instance) that it saturates at all ones.
module tb_or_pulse_counter;
  timeunit 1ps; timeprecision 1ps;

  logic        clear_n, window, sig;
  logic [15:0] count;
  logic [3:0]  count4;
  int checks = 0, failures = 0;

  or_pulse_counter dut (.clear_n, .window, .sig, .count);
  or_pulse_counter #(.CNT_W(4)) dut4 (.clear_n, .window, .sig, .count(count4));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulses(input int n);
    repeat (n) begin
      #30 sig = 1'b1;
      #30 sig = 1'b0;
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
    int n;
    sig = 0; window = 0; clear_n = 1;
    #10 clear_n = 0;
    #90 clear_n = 1;
    #10;
    check(count == 0, "count cleared");
    for (int t = 0; t < 20; t++) begin
      n = 1 + int'($urandom_range(40));
      clear_n = 0; #20 clear_n = 1;
      pulses(int'($urandom_range(5)));   // outside the window: not counted
      #15 window = 1;
      pulses(n);
      #15 window = 0;
      pulses(int'($urandom_range(5)));
      #10;
      check(count == 16'(n), $sformatf("count=%0d expected %0d", count, n));
      check(count4 == ((n > 15) ? 4'hf : 4'(n)), $sformatf("count4=%0d n=%0d", count4, n));
    end
    clear_n = 0; #10;
    check(count == 0 && count4 == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
