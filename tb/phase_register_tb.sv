// phase_register_tb: self-checking test of the tuning-word register.
//
// Applies random tuning words and checks that q1 shows each one exactly one
// clock later, that q1 holds between edges, and that an asynchronous reset
// clears it without waiting for a clock edge.
`timescale 1ns/1ps
module phase_register_tb;
  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         reset;
  logic [W-1:0] d1, q1;
  logic [W-1:0] prev_d1;
  int checks = 0, failures = 0;

  phase_register dut (.clk(clk), .reset(reset), .d1(d1), .q1(q1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: d1=%h q1=%h", what, d1, q1);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    d1    = 16'hFFFF;
    repeat (3) @(posedge clk);
    #1 check(q1 == '0, "reset clears q1");
    @(negedge clk) reset = 1'b0;
    @(posedge clk);
    #1 check(q1 == 16'hFFFF, "first load after reset");
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      prev_d1 = d1;
      d1 = W'($urandom);
      #1 check(q1 == prev_d1, "q1 holds between edges");
      @(posedge clk);
      #1 check(q1 == d1, "q1 takes d1 at the clock edge");
    end
    // asynchronous reset between clock edges
    @(negedge clk);
    d1 = 16'h1234;
    @(posedge clk);
    #2 reset = 1'b1;
    #1 check(q1 == '0, "asynchronous reset");
    @(negedge clk) reset = 1'b0;
    @(posedge clk);
    #1 check(q1 == 16'h1234, "load after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
