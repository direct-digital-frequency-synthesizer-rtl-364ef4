// quarter_wave_lut: phase-to-sine conversion from a quarter-period table.
//
// The phase word (address) is split into the quadrant, its two most
// significant bits, and the next QADDR_W bits, the position inside the
// quadrant; the remaining low phase bits are not used (phase truncation).
//   quadrant 0 (0 .. pi/2)      ROM read forwards, address counts up
//   quadrant 1 (pi/2 .. pi)     ROM read backwards, address counts down
//   quadrant 2 (pi .. 3pi/2)    as quadrant 0, value multiplied by -1
//   quadrant 3 (3pi/2 .. 2pi)   as quadrant 1, value multiplied by -1
// Reading backwards is done by complementing the in-quadrant bits, so the
// ROM sees DEPTH-1-i for position i. This address forming and the negation in
// the second half period are the scheme of the reference design; the
// two's-complement output format is this implementation's choice.
//
// Interface: clk, reset (asynchronous, active high, clears the sign stage),
// address (phase, PHASE_W bits), LUT_out (signed sample, SAMPLE_W bits,
// magnitude up to 2^AMP_W - 1). Timing: LUT_out belongs to the address
// presented one clock earlier (the ROM read is registered, and the sign is
// delayed by one register to stay aligned with it).
module quarter_wave_lut
  import dds_pkg::*;
#(
  parameter int unsigned PHASE_W  = dds_pkg::DDS_PHASE_W,
  parameter int unsigned SAMPLE_W = dds_pkg::DDS_SAMPLE_W,
  parameter int unsigned QADDR_W  = dds_pkg::DDS_QADDR_W,
  parameter int unsigned AMP_W    = dds_pkg::DDS_AMP_W
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic        [PHASE_W-1:0]  address,
  output logic signed [SAMPLE_W-1:0] LUT_out
);

  // The table index must fit in the phase below the quadrant bits, and the
  // negated magnitude must fit in the signed sample.
  if (QADDR_W + 2 > PHASE_W) begin : g_bad_qaddr
    $error("quarter_wave_lut: QADDR_W + 2 must not exceed PHASE_W");
  end
  if (AMP_W + 1 > SAMPLE_W) begin : g_bad_amp
    $error("quarter_wave_lut: AMP_W + 1 must not exceed SAMPLE_W");
  end

  quadrant_e          quadrant;
  logic [QADDR_W-1:0] index;
  logic [QADDR_W-1:0] rom_addr;
  logic [AMP_W-1:0]   magnitude;
  logic               negate_q;

  always_comb begin
    quadrant = quadrant_e'(address[PHASE_W-1 -: 2]);
    index    = address[PHASE_W-3 -: QADDR_W];
    // quadrants 1 and 3 run the table backwards
    if (quadrant == Q_FALL_POS || quadrant == Q_RISE_NEG) rom_addr = ~index;
    else                                                   rom_addr = index;
  end

  quarter_sine_rom #(
    .QADDR_W(QADDR_W),
    .AMP_W  (AMP_W)
  ) u_rom (
    .clk (clk),
    .addr(rom_addr),
    .data(magnitude)
  );

  // second half period (quadrants 2 and 3): multiply by -1
  always_ff @(posedge clk or posedge reset) begin
    if (reset) negate_q <= 1'b0;
    else       negate_q <= address[PHASE_W-1];
  end

  always_comb begin
    if (negate_q) LUT_out = -$signed({{(SAMPLE_W - AMP_W){1'b0}}, magnitude});
    else          LUT_out =  $signed({{(SAMPLE_W - AMP_W){1'b0}}, magnitude});
  end

endmodule
