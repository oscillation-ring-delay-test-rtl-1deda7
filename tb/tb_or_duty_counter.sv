// tb_or_duty_counter: self-checking test of the duty-cycle counter.
//
// A 10 ps fast clock and a waveform with random high and low durations (whole
// multiples of the fast period, edges placed half-way between fast clock
// edges) are used. The window opens on a rising edge of the waveform and
// spans whole periods, so the expected counts are exactly
// periods*high/10 and periods*low/10. Also checks that counts hold after
// the window closes and that clear_n resets them.
module tb_or_duty_counter;
  timeunit 1ps; timeprecision 1ps;

  logic        fclk = 0, clear_n, window, sig;
  logic [15:0] high_count, low_count;
  int checks = 0, failures = 0;

  or_duty_counter dut (.fclk, .clear_n, .window, .sig, .high_count, .low_count);

  always #5 fclk = ~fclk;

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
    int hi, lo, per;
    sig = 0; window = 0; clear_n = 1;
    #102;                       // waveform edges fall 3 ps before fclk rising edges
    for (int t = 0; t < 12; t++) begin
      hi  = 10 * (1 + int'($urandom_range(15)));
      lo  = 10 * (1 + int'($urandom_range(15)));
      per = 3 + int'($urandom_range(5));
      clear_n = 0; #20 clear_n = 1; #20;
      window = 1;
      repeat (per) begin
        sig = 1; #(hi);
        sig = 0; #(lo);
      end
      window = 0;
      repeat (2) begin
        sig = 1; #(hi);
        sig = 0; #(lo);
      end
      check(high_count == 16'(per * hi / 10), $sformatf("high=%0d expected %0d", high_count, per * hi / 10));
      check(low_count  == 16'(per * lo / 10), $sformatf("low=%0d expected %0d", low_count, per * lo / 10));
    end
    clear_n = 0; #10;
    check(high_count == 0 && low_count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
