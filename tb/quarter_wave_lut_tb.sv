// quarter_wave_lut_tb: self-checking test of the phase-to-sine conversion.
//
// Presents every one of the 65536 phase words (in a scrambled order so that
// consecutive reads jump between quadrants) and checks, one clock later,
// that LUT_out equals round(32767 * sin(2 pi (p + 0.5) / 4096)) within one
// LSB, with p the phase truncated to its 12 most significant bits. This
// reference is a full-period sine computed in floating point, so it checks
// the quadrant decode, the backward reads and the negation independently of
// how the table is addressed. Also checks exact odd and mirror symmetry and
// counts how often each quadrant was exercised.
`timescale 1ns/1ps
module quarter_wave_lut_tb;
  localparam int unsigned PHASE_W  = 16;
  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned QADDR_W  = 10;
  localparam int unsigned AMP_W    = 15;
  localparam int unsigned PBITS    = QADDR_W + 2;  // phase bits that reach the table
  localparam real         PI       = 3.14159265358979323846;

  logic                       clk = 1'b0;
  logic                       reset;
  logic        [PHASE_W-1:0]  address, addr_d;
  logic signed [SAMPLE_W-1:0] LUT_out;
  int checks = 0, failures = 0;
  int quadrant_hits [4];
  int sample_of [1 << PBITS];

  quarter_wave_lut dut (.clk(clk), .reset(reset), .address(address), .LUT_out(LUT_out));

  always #5 clk = ~clk;

  function automatic int expected(input logic [PHASE_W-1:0] a);
    int p;
    p = int'(a[PHASE_W-1 -: PBITS]);
    return $rtoi($floor(32767.0 * $sin(2.0 * PI * (real'(p) + 0.5) / real'(1 << PBITS)) + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: address=%h LUT_out=%0d expected=%0d", what, addr_d, LUT_out,
               expected(addr_d));
    end
  endtask

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int diff, p, missing;
    foreach (quadrant_hits[q]) quadrant_hits[q] = 0;
    foreach (sample_of[i]) sample_of[i] = 0;
    reset   = 1'b1;
    address = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int n = 0; n < (1 << PHASE_W); n++) begin
      // odd multiplier: a permutation of all phase words
      address = PHASE_W'(n * 40503 + 12345);
      addr_d  = address;
      @(posedge clk);
      #1;
      diff = int'(LUT_out) - expected(addr_d);
      check(diff >= -1 && diff <= 1, "sample matches the full-period sine");
      quadrant_hits[addr_d[PHASE_W-1 -: 2]]++;
      sample_of[addr_d[PHASE_W-1 -: PBITS]] = int'(LUT_out);
      @(negedge clk);
    end
    // symmetry of the rebuilt period: s(p + half) = -s(p), s(half - 1 - p) = s(p)
    for (p = 0; p < (1 << (PBITS - 1)); p++) begin
      checks++;
      if (sample_of[p + (1 << (PBITS - 1))] != -sample_of[p]) begin
        failures++;
        $display("FAIL odd symmetry at p=%0d", p);
      end
      checks++;
      if (sample_of[(1 << (PBITS - 1)) - 1 - p] != sample_of[p]) begin
        failures++;
        $display("FAIL mirror symmetry at p=%0d", p);
      end
    end
    missing = 0;
    foreach (quadrant_hits[q]) begin
      $display("quadrant %0d read %0d times", q, quadrant_hits[q]);
      if (quadrant_hits[q] == 0) missing++;
    end
    checks++;
    if (missing != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
