// tb_or_input_stage: self-checking test of the multiplexer/XOR input stage.
//
// Drives random patterns, connections, selects, inversions and outputs into
// a 5-input, 3-output instance (so that one select value points past the
// last output) and compares every CUT input with a per-bit reference:
// pattern bit when not connected, otherwise the selected output (0 when the
// select is out of range), XOR the inversion bit.
module tb_or_input_stage;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NPI = 5, NPO = 3, SELW = 2;

  logic [NPI-1:0]           pattern, conn_en, inv, cut_in;
  logic [NPI-1:0][SELW-1:0] conn_sel;
  logic [NPO-1:0]           po;
  int checks = 0, failures = 0;

  or_input_stage #(.NPI(NPI), .NPO(NPO), .SELW(SELW)) dut (
    .pattern, .conn_en, .conn_sel, .inv, .po, .cut_in
  );

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_bit;
    int   sel;
    for (int t = 0; t < 2000; t++) begin
      pattern  = NPI'($urandom);
      conn_en  = NPI'($urandom);
      inv      = NPI'($urandom);
      conn_sel = (NPI*SELW)'($urandom);
      po       = NPO'($urandom);
      #10;
      for (int i = 0; i < NPI; i++) begin
        sel = int'(conn_sel[i]);
        if (!conn_en[i])   expect_bit = pattern[i];
        else if (sel < NPO) expect_bit = po[sel];
        else               expect_bit = 1'b0;
        expect_bit = expect_bit ^ inv[i];
        checks++;
        if (cut_in[i] !== expect_bit) begin
          failures++;
          if (failures < 10)
            $display("FAIL: t=%0d input %0d cut_in=%b expected %b", t, i, cut_in[i], expect_bit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
