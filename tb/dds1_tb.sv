// dds1_tb: end-to-end test of the synthesizer at its default sizes.
//
// Runs the full design from a 16.6 MHz clock with the tuning words 10 and 20
// (the two operating points the design was characterised at), then a large
// random word, a reset in the middle of a run and a tuning-word change on the
// fly. Every clock it checks q1, Result, q2 and address against a reference
// model of the register and accumulator, and checks out against a full-period
// floating-point sine of the phase two clocks earlier (within one LSB). It
// measures the output frequency from the rising zero crossings of out and
// compares it with F_out = M * F_clk / 2^16, and checks that doubling M
// doubles the frequency.
//
// Mechanisms counted (each must occur at least once): accumulator overflow,
// a read in each of the four quadrants (forward, backward, forward negated,
// backward negated), a tuning-word change with the phase continuing without
// a jump, and an asynchronous reset.
`timescale 1ps/1ps
module dds1_tb;
  localparam int unsigned PHASE_W  = 16;
  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned PBITS    = 12;          // phase bits that reach the table
  localparam real         PI       = 3.14159265358979323846;
  localparam real         F_CLK    = 16.6e6;
  localparam int          HALF_PS  = 30120;       // half of a 16.6 MHz period, in ps

  logic                       clk = 1'b0;
  logic                       reset;
  logic        [PHASE_W-1:0]  d1;
  logic signed [SAMPLE_W-1:0] out;
  logic        [PHASE_W-1:0]  q1, Result, q2, address;

  dds1 dut (.clk(clk), .reset(reset), .d1(d1), .out(out), .q1(q1), .Result(Result),
            .q2(q2), .address(address));

  always #(HALF_PS) clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_overflow = 0, n_switch = 0, n_reset = 0;
  int n_quadrant [4];

  // reference model state, updated at every rising edge
  logic [PHASE_W-1:0] m_q1, m_q2, m_hist1, m_hist2;
  logic [PHASE_W-1:0] d1_before;
  logic signed [SAMPLE_W-1:0] out_prev;
  bit   measuring = 1'b0;
  int   crossings;
  longint cycle = 0, first_cross, last_cross;

  function automatic int sine_ref(input logic [PHASE_W-1:0] p);
    int idx;
    idx = int'(p[PHASE_W-1 -: PBITS]);
    return $rtoi($floor(32767.0 * $sin(2.0 * PI * (real'(idx) + 0.5) / real'(1 << PBITS)) + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at cycle %0d: d1=%0d q1=%0d q2=%0d Result=%0d out=%0d (model q1=%0d q2=%0d)",
                 what, cycle, d1, q1, q2, Result, out, m_q1, m_q2);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model and per-clock checks. d1 is sampled just before the edge.
  always @(negedge clk) d1_before <= d1;

  always @(posedge clk or posedge reset) begin
    int diff;
    if (reset) begin
      m_q1 = '0; m_q2 = '0; m_hist1 = '0; m_hist2 = '0;
    end else begin
      cycle++;
      m_hist2 = m_hist1;                 // phase two edges ago
      m_hist1 = m_q2;                    // phase one edge ago
      if (m_q2 + m_q1 < m_q2) n_overflow++;
      m_q2 = m_q2 + m_q1;
      m_q1 = d1_before;
      #1;
      check(q1 == m_q1, "tuning word register");
      check(q2 == m_q2, "phase accumulator");
      check(address == q2, "table address is the phase");
      check(Result == PHASE_W'(m_q2 + m_q1), "adder output");
      diff = int'(out) - sine_ref(m_hist2);
      check(diff >= -1 && diff <= 1, "sine sample");
      n_quadrant[m_hist2[PHASE_W-1 -: 2]]++;
      if (measuring && out_prev < 0 && out >= 0) begin
        if (crossings == 0) first_cross = cycle;
        last_cross = cycle;
        crossings++;
      end
      out_prev = out;
    end
  end

  // Runs the current tuning word for the given number of rising zero
  // crossings and returns the measured output frequency in Hz.
  task automatic measure(input int want, output real f_hz);
    crossings = 0;
    measuring = 1'b1;
    while (crossings < want) @(posedge clk);
    measuring = 1'b0;
    #2;
    f_hz = real'(want - 1) / (real'(last_cross - first_cross) * 2.0 * real'(HALF_PS) * 1.0e-12);
  endtask

  task automatic check_freq(input int m, input real f_hz);
    real f_exp;
    f_exp = real'(m) * F_CLK / 65536.0;
    $display("M = %0d: measured %0.2f Hz, formula %0.2f Hz", m, f_hz, f_exp);
    checks++;
    if (f_hz < f_exp * 0.995 || f_hz > f_exp * 1.005) begin
      failures++;
      $display("FAIL output frequency for M = %0d", m);
    end
  endtask

  initial begin
    real f10, f20, fbig;
    logic [PHASE_W-1:0] phase_before;
    foreach (n_quadrant[i]) n_quadrant[i] = 0;
    out_prev = '0;
    d1 = 16'd10;
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(out == 0 && q1 == 0 && q2 == 0, "reset state");
    @(negedge clk) reset = 1'b0;

    // latency: the word reaches q1 after one clock, q2 after two
    @(posedge clk); #2 check(q1 == 16'd10 && q2 == 16'd0, "q1 after one clock");
    @(posedge clk); #2 check(q2 == 16'd10, "q2 after two clocks");

    // tuning word 10
    measure(4, f10);
    check_freq(10, f10);

    // tuning word 20, switched on the fly: the phase must continue
    @(negedge clk);
    phase_before = q2;
    d1 = 16'd20;
    @(posedge clk); #2 check(q2 == PHASE_W'(phase_before + 16'd10), "old word still in use");
    @(posedge clk); #2 check(q2 == PHASE_W'(phase_before + 16'd30), "phase continuous after switch");
    n_switch++;
    measure(4, f20);
    check_freq(20, f20);
    checks++;
    if (f20 / f10 < 1.99 || f20 / f10 > 2.01) begin
      failures++;
      $display("FAIL frequency not proportional to the tuning word: %f", f20 / f10);
    end

    // asynchronous reset in the middle of a run, between clock edges
    @(posedge clk);
    #(HALF_PS / 2) reset = 1'b1;
    #1 check(out == 0 && q1 == 0 && q2 == 0, "asynchronous reset mid-run");
    n_reset++;
    @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // a large word (about 1.2 MHz at 16.6 MHz)
    d1 = 16'h1234;
    n_switch++;
    repeat (3) @(posedge clk);
    measure(50, fbig);
    check_freq(32'h1234, fbig);

    // every mechanism must have happened
    $display("overflows=%0d switches=%0d resets=%0d quadrant reads=%0d/%0d/%0d/%0d",
             n_overflow, n_switch, n_reset, n_quadrant[0], n_quadrant[1], n_quadrant[2],
             n_quadrant[3]);
    checks++; if (n_overflow == 0) begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_switch == 0)   begin failures++; $display("FAIL no word change"); end
    checks++; if (n_reset == 0)    begin failures++; $display("FAIL no reset"); end
    foreach (n_quadrant[i]) begin
      checks++;
      if (n_quadrant[i] == 0) begin failures++; $display("FAIL quadrant %0d never read", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
