// phase_mult: weight-phase generator of the beamforming PE (the "X" block).
//
// Each beam weight is a complex exponential exp(j*omega*dt). For one beam and
// one sensor the delay dt is the same for every frequency bin, so instead of
// storing a weight per bin the PE stores one dt per sensor and forms the phase
// as the product of the bin index f (counted on chip) and dt (read from RAM).
// That multiplier is the storage saving the design is built around: weight
// memory per beam shrinks by the number of frequency bins.
//
// Phases are binary angles (2^PHASE_W = one turn), so only the low PHASE_W
// bits of f*dt are kept; the dropped high bits are whole turns. dt therefore
// is the phase step per frequency bin in binary-angle units.
//
// Timing: fully pipelined, one product per clock, STAGES clocks of latency
// (STAGES >= 1). The pipeline depth is this design's choice; the multiply
// itself follows the original design.
module phase_mult
  import sonar_pkg::*;
#(
  parameter int unsigned F_W    = $clog2(DEF_BINS),  // width of bin index f
  parameter int unsigned STAGES = 2                   // pipeline registers
) (
  input  logic           clk,
  input  logic [F_W-1:0] f,      // frequency-bin index (on chip)
  input  dt_t            dt,     // per-sensor delay (from RAM)
  output phase_t         omega   // f*dt modulo one turn
);

  // The product is followed by STAGES registers so that a synthesis tool can
  // retime the multiplier into them.
  // Only the low PHASE_W product bits are formed (F_W <= PHASE_W).
  phase_t prod;
  phase_t pipe [STAGES];

  assign prod = phase_t'(f) * phase_t'(dt);

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(STAGES); i++) begin
      if (i == 0) pipe[i] <= prod;
      else        pipe[i] <= pipe[i-1];
    end
  end

  assign omega = pipe[STAGES-1];

endmodule
