// phase_register: holds the frequency tuning word of the synthesizer.
//
// The tuning word d1 is captured on every rising clock edge and offered to
// the phase accumulator as q1, so a new word takes effect one clock after it
// is applied and the accumulator always adds a stable, registered value.
// The register is PHASE_W = 16 bits wide, as in the reference design.
//
// Interface: clk, reset (asynchronous, active high, clears q1 so that the
// phase stands still), d1 in, q1 out. Latency: one clock from d1 to q1.
// Loading on every clock (no load enable) and the asynchronous reset are this
// implementation's choices.
module phase_register #(
  parameter int unsigned PHASE_W = dds_pkg::DDS_PHASE_W
) (
  input  logic               clk,
  input  logic               reset,
  input  logic [PHASE_W-1:0] d1,
  output logic [PHASE_W-1:0] q1
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) q1 <= '0;
    else       q1 <= d1;
  end

endmodule
