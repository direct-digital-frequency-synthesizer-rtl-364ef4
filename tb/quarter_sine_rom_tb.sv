// quarter_sine_rom_tb: self-checking test of the quarter-wave sine table.
//
// Reads every entry of the default 1024 x 15-bit table in address order and
// compares it, one clock after the address, with round(32767 * sin((2i+1) *
// pi / 4096)) computed here in floating point. A difference of one LSB is
// allowed for the fixed-point evaluation inside the table. Also checks that
// the table rises monotonically and that data arrives after exactly one clock.
`timescale 1ns/1ps
module quarter_sine_rom_tb;
  localparam int unsigned QADDR_W = 10;
  localparam int unsigned AMP_W   = 15;
  localparam int unsigned DEPTH   = 1 << QADDR_W;
  localparam real         PI      = 3.14159265358979323846;

  logic               clk = 1'b0;
  logic [QADDR_W-1:0] addr;
  logic [AMP_W-1:0]   data, last;
  int checks = 0, failures = 0;
  int exact = 0;

  quarter_sine_rom dut (
    .clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  function automatic int expected(input int i);
    real full;
    full = real'((1 << AMP_W) - 1);
    return $rtoi(full * $sin(real'(2 * i + 1) * PI / real'(4 * DEPTH)) + 0.5);
  endfunction

  task automatic check(input bit ok, input string what, input int i);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: i=%0d data=%0d expected=%0d", what, i, data, expected(i));
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int diff;
    last = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      addr = QADDR_W'(i);
      @(posedge clk);
      #1;
      diff = int'(data) - expected(i);
      check(diff >= -1 && diff <= 1, "entry matches the sine", i);
      if (diff == 0) exact++;
      check(data >= last, "table rises monotonically", i);
      last = data;
    end
    check(exact > DEPTH * 9 / 10, "nearly all entries exact", exact);
    // one-clock latency: data changes only at the clock edge
    @(negedge clk) addr = '0;
    #1 check(data == AMP_W'(expected(DEPTH - 1)) || int'(data) - expected(DEPTH - 1) inside {-1, 1},
             "data holds until the clock edge", DEPTH - 1);
    @(posedge clk);
    #1 check(int'(data) - expected(0) inside {-1, 0, 1}, "data after one clock", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
