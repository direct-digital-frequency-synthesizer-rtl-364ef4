// dds_pkg: widths shared by the blocks of the quarter-wave direct digital
// frequency synthesizer.
//
// The synthesizer is a phase register holding the frequency tuning word, a
// phase accumulator that adds that word to itself every clock (modulo
// 2^DDS_PHASE_W), and a look-up table that turns the accumulated phase into a sine
// sample while storing only the first quarter of the period.
//
// DDS_PHASE_W = 16 and DDS_SAMPLE_W = 16 are the widths of the reference design. The
// size of the quarter-wave table (DDS_QADDR_W address bits) and the magnitude
// resolution (DDS_AMP_W bits) are this implementation's own choice: 10 + 2 phase
// bits into the table keep the phase-truncation spurs near -72 dBc, in line
// with the roughly 73 dB spurious-free range the reference design reports.
package dds_pkg;

  localparam int unsigned DDS_PHASE_W = 16;  // phase register and accumulator width
  localparam int unsigned DDS_SAMPLE_W = 16;  // width of the sine sample bus
  localparam int unsigned DDS_QADDR_W = 10;  // address bits of the quarter-wave ROM
  localparam int unsigned DDS_AMP_W   = 15;  // magnitude bits stored in the ROM

  // Quadrant of the phase, taken from its two most significant bits.
  typedef enum logic [1:0] {
    Q_RISE_POS = 2'd0,  // 0 .. pi/2      : read the ROM forwards
    Q_FALL_POS = 2'd1,  // pi/2 .. pi     : read the ROM backwards
    Q_FALL_NEG = 2'd2,  // pi .. 3pi/2    : forwards, negated
    Q_RISE_NEG = 2'd3   // 3pi/2 .. 2pi   : backwards, negated
  } quadrant_e;

endpackage
