// phase_accumulator_tb: self-checking test of the phase accumulator.
//
// Drives random tuning words (held for random stretches, including the
// extremes 0, 1 and 2^16-1) and compares Result and q2 every clock with a
// 32-bit reference sum reduced modulo 2^16. Counts the wrap-arounds (the
// accumulator's overflow) and fails if none occurred. Also checks the
// formula F_out = M * F_clk / 2^16 by counting wraps over a fixed window.
`timescale 1ns/1ps
module phase_accumulator_tb;
  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         reset;
  logic [W-1:0] q1, Result, q2;
  longint       model;       // reference phase, kept as an unbounded sum
  int checks = 0, failures = 0;
  int wraps = 0;

  phase_accumulator dut (
    .clk(clk), .reset(reset), .q1(q1), .Result(Result), .q2(q2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q1=%h q2=%h Result=%h model=%h", what, q1, q2, Result, W'(model));
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hold, wraps_window;
    reset = 1'b1;
    q1    = 16'd7;
    repeat (2) @(posedge clk);
    #1 check(q2 == '0, "reset clears the phase");
    @(negedge clk) reset = 1'b0;
    model = 0;
    for (int seg = 0; seg < 60; seg++) begin
      case (seg)
        0:       q1 = 16'd0;
        1:       q1 = 16'd1;
        2:       q1 = 16'hFFFF;
        default: q1 = W'($urandom);
      endcase
      hold = 5 + ($urandom % 200);
      for (int c = 0; c < hold; c++) begin
        #1 check(Result == W'(model + longint'(q1)), "Result is phase + tuning word");
        @(posedge clk);
        if (model + longint'(q1) >= (longint'(1) << W)) wraps++;
        model = (model + longint'(q1)) % (longint'(1) << W);
        #1 check(q2 == W'(model), "q2 follows the running sum");
        @(negedge clk);
      end
    end
    check(wraps > 0, "accumulator overflowed at least once");
    $display("accumulator wraps: %0d", wraps);

    // frequency check: M = 10 over 65536 clocks gives exactly 10 wraps
    q1 = 16'd10;
    reset = 1'b1;
    @(negedge clk) reset = 1'b0;
    wraps_window = 0;
    for (int c = 0; c < 65536; c++) begin
      @(posedge clk);
      #1 if (q2 < 16'd10) wraps_window++;
    end
    check(wraps_window == 10, "10 wraps per 2^16 clocks at M = 10");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
