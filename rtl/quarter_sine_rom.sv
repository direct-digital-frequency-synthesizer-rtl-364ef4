// quarter_sine_rom: table of the first quarter period of a sine wave.
//
// Entry i holds round((2^AMP_W - 1) * sin((2i + 1) * pi / (4 * DEPTH))),
// DEPTH = 2^QADDR_W, i.e. the sine sampled in the middle of each of DEPTH equal
// steps between 0 and pi/2. Sampling at the step centres makes the table
// exactly mirror-symmetric about pi/2, so reading it backwards (address
// complemented) gives the second quarter without a one-entry skew.
//
// The contents are computed at elaboration by a constant function that
// evaluates the Taylor series of sin in 64-bit fixed point (28 fraction
// bits), so no data file is needed and any QADDR_W / AMP_W can be chosen.
// The table of the reference design was generated offline; its size is not
// given, and the default 1024 x 15 bits here is this implementation's choice.
//
// Interface: clk, addr in, data out. Timing: synchronous read, data is valid
// one clock after addr (the ROM maps onto an FPGA block memory). There is no
// reset: the output register simply holds the last word read.
module quarter_sine_rom #(
  parameter int unsigned QADDR_W = dds_pkg::DDS_QADDR_W,
  parameter int unsigned AMP_W   = dds_pkg::DDS_AMP_W
) (
  input  logic               clk,
  input  logic [QADDR_W-1:0] addr,
  output logic [AMP_W-1:0]   data
);

  localparam int unsigned DEPTH = 1 << QADDR_W;
  localparam int unsigned FRAC  = 28;                 // fixed-point fraction bits
  localparam longint      PI_FX = 64'd843314857;      // round(pi * 2^28)

  typedef logic [AMP_W-1:0] table_t [DEPTH];

  // sin(x) for 0 <= x <= pi/2, x and the result scaled by 2^FRAC.
  function automatic longint sin_fx(input longint x);
    longint x2, term, acc;
    x2   = (x * x) >>> FRAC;
    term = x;
    acc  = x;
    for (int k = 1; k <= 7; k++) begin
      term = -(((term * x2) >>> FRAC) / longint'((2 * k) * (2 * k + 1)));
      acc  = acc + term;
    end
    return acc;
  endfunction

  function automatic table_t build_table();
    table_t t;
    longint full, x, s;
    full = (longint'(1) << AMP_W) - 1;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      x = (PI_FX * longint'(2 * i + 1)) / longint'(4 * DEPTH);
      s = sin_fx(x);
      // round to nearest: add one half of the fixed-point unit before shifting
      t[i] = AMP_W'((s * full + (longint'(1) << (FRAC - 1))) >>> FRAC);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) data <= TABLE[addr];

endmodule
