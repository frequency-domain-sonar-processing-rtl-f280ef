// sonar_pkg: widths, default sizes and shared types of the frequency-domain
// beamformer.
//
// The FFT stage delivers each frequency bin as a 16-bit magnitude and a 16-bit
// phase (32 bits per bin); those widths and the 256-point transform come from
// the original design. Phases are binary angles: the full 16-bit range is
// one turn, so 16'h4000 is pi/2 and addition wraps modulo 2*pi for free. The
// binary-angle encoding, sensor count, delay width and CORDIC guard bits are
// this design's choices.
package sonar_pkg;

  // Frequency-bin sample from the FFT stage.
  localparam int unsigned MAG_W   = 16;  // unsigned magnitude
  localparam int unsigned PHASE_W = 16;  // binary angle, 2^16 = one turn

  // Per-sensor delay read from RAM, in binary-angle units per frequency bin.
  localparam int unsigned DT_W = 16;

  // CORDIC: one micro-rotation stage per result bit.
  localparam int unsigned CORDIC_STAGES = 16;
  // CORDIC output: magnitude times the CORDIC gain (about 1.647) needs one
  // bit more than the magnitude, plus a sign bit.
  localparam int unsigned RECT_W = MAG_W + 2;

  // Default system sizes.
  localparam int unsigned DEF_BINS    = 256;   // FFT length N
  localparam int unsigned DEF_SENSORS = 64;   // sensors per beam
  localparam int unsigned DEF_BEAMS   = 10000;  // beams whose delays the RAM holds
  localparam int unsigned DEF_NUM_PE  = 2;    // PEs per FPGA

  typedef logic [MAG_W-1:0]   mag_t;
  typedef logic [PHASE_W-1:0] phase_t;
  typedef logic [DT_W-1:0]    dt_t;

  // One broadcast frequency-bin sample in polar form.
  typedef struct packed {
    mag_t   mag;
    phase_t phase;
  } polar_t;

  // One phase-shifted sample in rectangular form.
  typedef struct packed {
    logic signed [RECT_W-1:0] re;
    logic signed [RECT_W-1:0] im;
  } rect_t;

endpackage
