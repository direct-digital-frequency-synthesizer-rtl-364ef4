// dds1_sfdr_tb: spectral purity of the synthesizer output at default sizes.
//
// For each of several tuning words M the design runs from reset, 65536
// consecutive output samples are captured (one full cycle of the 16-bit phase
// accumulator, so the record is coherent and needs no window) and a 65536-
// point radix-2 FFT is computed here in floating point. The carrier must sit
// exactly in bin M (F_out = M * F_clk / 2^16), and the spurious-free dynamic
// range, the carrier power over the largest other bin between DC and Nyquist
// (DC included), must be at least 70 dB. The design aims at about 73 dB;
// truncating the phase to 12 table bits bounds the worst spur near
// -6.02 * 12 = -72 dBc.
`timescale 1ns/1ps
module dds1_sfdr_tb;
  localparam int unsigned N      = 65536;
  localparam int unsigned LOG2N  = 16;
  localparam real         PI     = 3.14159265358979323846;
  localparam real         MIN_DB = 70.0;

  logic               clk = 1'b0;
  logic               reset;
  logic [15:0]        d1;
  logic signed [15:0] out;

  dds1 dut (.clk(clk), .reset(reset), .d1(d1), .out(out), .q1(), .Result(), .q2(),
            .address());

  always #30 clk = ~clk;

  real re [N];
  real im [N];
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (N * 8) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned bitrev(input int unsigned x);
    int unsigned r = 0;
    for (int b = 0; b < LOG2N; b++) r |= ((x >> b) & 1) << (LOG2N - 1 - b);
    return r;
  endfunction

  // in-place iterative radix-2 decimation-in-time FFT
  task automatic fft();
    real tr, ti, wr, wi, ur, ui, ang;
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned j = bitrev(i);
      if (j > i) begin
        tr = re[i]; re[i] = re[j]; re[j] = tr;
        ti = im[i]; im[i] = im[j]; im[j] = ti;
      end
    end
    for (int unsigned len = 2; len <= N; len <<= 1) begin
      for (int unsigned k = 0; k < len / 2; k++) begin
        ang = -2.0 * PI * real'(k) / real'(len);
        wr = $cos(ang);
        wi = $sin(ang);
        for (int unsigned s = 0; s < N; s += len) begin
          int unsigned a, b;
          a = s + k;
          b = s + k + len / 2;
          tr = re[b] * wr - im[b] * wi;
          ti = re[b] * wi + im[b] * wr;
          ur = re[a]; ui = im[a];
          re[a] = ur + tr; im[a] = ui + ti;
          re[b] = ur - tr; im[b] = ui - ti;
        end
      end
    end
  endtask

  task automatic run_word(input int unsigned m);
    real p, carrier, spur, sfdr;
    int unsigned peak, spur_bin;
    reset = 1'b1;
    d1 = 16'(m);
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    repeat (4) @(posedge clk);          // fill the pipeline
    for (int unsigned i = 0; i < N; i++) begin
      @(posedge clk);
      #1;
      re[i] = real'(out);
      im[i] = 0.0;
    end
    fft();
    carrier = 0.0; peak = 0;
    for (int unsigned k = 0; k <= N / 2; k++) begin
      p = re[k] * re[k] + im[k] * im[k];
      if (p > carrier) begin carrier = p; peak = k; end
    end
    spur = 0.0; spur_bin = 0;
    for (int unsigned k = 0; k <= N / 2; k++) begin
      p = re[k] * re[k] + im[k] * im[k];
      if (k != peak && p > spur) begin spur = p; spur_bin = k; end
    end
    sfdr = 10.0 * $log10(carrier / (spur + 1.0e-30));
    $display("M = %0d: carrier in bin %0d, largest spur in bin %0d, SFDR %0.1f dB",
             m, peak, spur_bin, sfdr);
    checks++;
    if (peak != m) begin
      failures++;
      $display("FAIL carrier in bin %0d, expected %0d", peak, m);
    end
    checks++;
    if (sfdr < MIN_DB) begin
      failures++;
      $display("FAIL SFDR %0.1f dB below %0.1f dB", sfdr, MIN_DB);
    end
  endtask

  initial begin
    run_word(10);
    run_word(20);
    run_word(1001);
    run_word(4661);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
