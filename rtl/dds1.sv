// dds1: quarter-wave direct digital frequency synthesizer, top level.
//
// A frequency tuning word d1 is registered in the phase register (q1) and
// added every clock to the phase accumulator (q2), which wraps modulo
// 2^PHASE_W. The phase addresses a look-up table that stores only the first
// quarter of a sine period and rebuilds the other three quarters by reading
// it backwards and negating it. The sample is registered once more (out) to
// feed an external DAC and low-pass filter, which are not part of this RTL.
// The output frequency is  F_out = d1 * F_clk / 2^PHASE_W.
//
// Ports follow the reference design's top level: clk, reset, d1 in; out (the
// sine sample, two's complement) and the internal buses q1 (tuning word),
// Result (adder output), q2 (phase) and address (table address = phase) out.
// reset is asynchronous and active high and clears the tuning word, the
// phase and the output.
//
// Timing: a tuning word reaches q1 after 1 clock and first changes q2 after
// 2; a phase value in q2 appears at out 2 clocks later (registered ROM read,
// then the output register). The output register and the ports that bring
// out q1 and address are as in the reference design's schematic; the two's
// complement sample format and the table size are this implementation's
// choices.
module dds1 #(
  parameter int unsigned PHASE_W  = dds_pkg::DDS_PHASE_W,
  parameter int unsigned SAMPLE_W = dds_pkg::DDS_SAMPLE_W,
  parameter int unsigned QADDR_W  = dds_pkg::DDS_QADDR_W,
  parameter int unsigned AMP_W    = dds_pkg::DDS_AMP_W
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic        [PHASE_W-1:0]  d1,
  output logic signed [SAMPLE_W-1:0] out,
  output logic        [PHASE_W-1:0]  q1,
  output logic        [PHASE_W-1:0]  Result,
  output logic        [PHASE_W-1:0]  q2,
  output logic        [PHASE_W-1:0]  address
);

  logic signed [SAMPLE_W-1:0] lut_out;

  phase_register #(.PHASE_W(PHASE_W)) u_phase_register (
    .clk  (clk),
    .reset(reset),
    .d1   (d1),
    .q1   (q1)
  );

  phase_accumulator #(.PHASE_W(PHASE_W)) u_phase_accumulator (
    .clk   (clk),
    .reset (reset),
    .q1    (q1),
    .Result(Result),
    .q2    (q2)
  );

  always_comb address = q2;

  quarter_wave_lut #(
    .PHASE_W (PHASE_W),
    .SAMPLE_W(SAMPLE_W),
    .QADDR_W (QADDR_W),
    .AMP_W   (AMP_W)
  ) u_lut (
    .clk    (clk),
    .reset  (reset),
    .address(address),
    .LUT_out(lut_out)
  );

  // output register towards the DAC
  always_ff @(posedge clk or posedge reset) begin
    if (reset) out <= '0;
    else       out <= lut_out;
  end

endmodule
