// phase_accumulator: the adder and feedback register that generate the phase.
//
// Every rising clock edge the tuning word q1 is added to the accumulated
// phase q2 and the sum is stored back, modulo 2^PHASE_W. The phase therefore
// wraps once every 2^PHASE_W / q1 clocks, and the sine read from it has the
// frequency  F_out = q1 * F_clk / 2^PHASE_W.
//
// Interface: clk, reset (asynchronous, active high, clears the phase), q1
// (tuning word), Result (the adder output, i.e. the phase of the next clock,
// combinational), q2 (the registered phase). Latency: q2 takes the value of
// Result one clock later. The carry out of the adder is dropped, which is the
// modulo-2^n wrap the synthesizer relies on.
module phase_accumulator #(
  parameter int unsigned PHASE_W = dds_pkg::DDS_PHASE_W
) (
  input  logic               clk,
  input  logic               reset,
  input  logic [PHASE_W-1:0] q1,
  output logic [PHASE_W-1:0] Result,
  output logic [PHASE_W-1:0] q2
);

  always_comb Result = q2 + q1;  // wraps modulo 2^PHASE_W

  always_ff @(posedge clk or posedge reset) begin
    if (reset) q2 <= '0;
    else       q2 <= Result;
  end

endmodule
