// phase_adder: phase shift of the CPAC (the "+" block of the PE).
//
// In polar form, multiplying a frequency-bin sample by the weight
// exp(j*omega) is just an addition of omega to the sample's phase; the
// magnitude is untouched. Phases are binary angles, so the PHASE_W-bit sum
// wraps modulo one turn with no extra logic. The magnitude is carried along
// so that both leave the block in the same clock.
//
// Timing: one registered stage, one sample per clock, latency 1. Registering
// the sum is this design's choice.
module phase_adder
  import sonar_pkg::*;
(
  input  logic   clk,
  input  polar_t in,        // broadcast sample (magnitude, phase)
  input  phase_t omega,     // weight phase f*dt
  output polar_t out        // (magnitude, phase + omega)
);

  always_ff @(posedge clk) begin
    out.mag   <= in.mag;
    out.phase <= in.phase + omega;
  end

endmodule
