// or_test_controller: the test controller (host) of the oscillation ring test.
//
// It steps through a table of test conditions (or_pkg::or_test_t). For each
// one it drives the input stage (connection, XOR control, merged test
// pattern) and activates the detectors of the observed outputs, then runs
// four phases:
//   APPLY  SETTLE_CYCLES cycles, counters held cleared, the ring starts up;
//   WINDOW WIN_CYCLES cycles with the measurement window open;
//   HOLD   SETTLE_CYCLES cycles with the window closed, counts settle;
//   CHECK  one cycle: the output stage's detect is recorded in test_fail.
// After the last pattern it raises done, and pass if no pattern detected a
// fault. The XOR control is the complement of the recorded path parity on
// each fed-back input, so every ring has odd inversion parity.
// What the host does follows the published organization; the phase sequence
// and its lengths are this design's choices.
//
// Interface: clk, rst_n (async, active low), start (pulse, accepted when not
// busy), detect; test conditions out, clear_n, window, status out.
// Timing: one pattern takes 2*SETTLE_CYCLES + WIN_CYCLES + 1 cycles from the
// first APPLY cycle to its CHECK cycle (result_valid).
module or_test_controller
  import or_pkg::*;
#(
  parameter int unsigned NTEST         = C17_NTEST,
  parameter or_test_t    TESTS [NTEST] = C17_TESTS,
  parameter int unsigned WIN_CYCLES    = 64,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned IDXW          = (NTEST > 1) ? $clog2(NTEST) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic                               detect,
  // test conditions
  output logic [C17_NPI-1:0]                 pattern,
  output logic [C17_NPI-1:0]                 conn_en,
  output logic [C17_NPI-1:0][C17_SELW-1:0]   conn_sel,
  output logic [C17_NPI-1:0]                 inv,
  output logic [C17_NPO-1:0]                 observe,
  // measurement control
  output logic                               clear_n,
  output logic                               window,
  // status
  output logic                               busy,
  output logic                               done,
  output logic                               pass,
  output logic                               result_valid,
  output logic [IDXW-1:0]                    cur_test,
  output logic [NTEST-1:0]                   test_fail
);
  timeunit 1ps; timeprecision 1ps;

  typedef enum logic [2:0] {
    ST_IDLE, ST_APPLY, ST_WINDOW, ST_HOLD, ST_CHECK, ST_DONE
  } state_t;

  localparam int unsigned TMRW = $clog2(((WIN_CYCLES > SETTLE_CYCLES) ? WIN_CYCLES : SETTLE_CYCLES) + 1);

  state_t          state;
  logic [TMRW-1:0] timer;
  logic [IDXW-1:0] idx;
  or_test_t        cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      timer     <= '0;
      idx       <= '0;
      test_fail <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            state     <= ST_APPLY;
            timer     <= '0;
            idx       <= '0;
            test_fail <= '0;
          end
        end
        ST_APPLY: begin
          if (timer == TMRW'(SETTLE_CYCLES - 1)) begin
            state <= ST_WINDOW;
            timer <= '0;
          end else
            timer <= timer + 1'b1;
        end
        ST_WINDOW: begin
          if (timer == TMRW'(WIN_CYCLES - 1)) begin
            state <= ST_HOLD;
            timer <= '0;
          end else
            timer <= timer + 1'b1;
        end
        ST_HOLD: begin
          if (timer == TMRW'(SETTLE_CYCLES - 1)) begin
            state <= ST_CHECK;
            timer <= '0;
          end else
            timer <= timer + 1'b1;
        end
        ST_CHECK: begin
          test_fail[idx] <= detect;
          if (idx == IDXW'(NTEST - 1))
            state <= ST_DONE;
          else begin
            state <= ST_APPLY;
            idx   <= idx + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy         = (state != ST_IDLE) && (state != ST_DONE);
  assign done         = (state == ST_DONE);
  assign pass         = done && (test_fail == '0);
  assign result_valid = (state == ST_CHECK);
  assign cur_test     = idx;
  assign window       = (state == ST_WINDOW);
  // Low only in APPLY, so each pattern starts with a falling edge of
  // clear_n: the pulse counters are clocked by the ring itself and see no
  // other event while the window is closed.
  assign clear_n      = (state != ST_APPLY);

  // Test conditions of the current pattern; all inputs static 0 when idle.
  always_comb begin
    cur = busy ? TESTS[idx] : '0;
    pattern  = cur.pattern;
    conn_en  = cur.conn_en;
    conn_sel = cur.conn_sel;
    inv      = cur.conn_en & ~cur.path_par;
    observe  = cur.observe;
  end

  // The window never opens while the counters are being cleared.
  a_window_not_cleared: assert property (@(posedge clk) disable iff (!rst_n) window |-> clear_n);
  // A result is only reported for a pattern of the table.
  a_result_in_range: assert property (@(posedge clk) disable iff (!rst_n) result_valid |-> (int'(idx) < NTEST));
endmodule
