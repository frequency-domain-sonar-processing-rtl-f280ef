// cordic_p2r: fully pipelined CORDIC polar-to-rectangular converter.
//
// Converts a (magnitude, phase) sample into (re, im) = K*mag*(cos, sin) of the
// phase, one sample per clock. This is what makes the polar form of the
// phase-shift/accumulate cheap: the phase shift becomes an addition upstream,
// and a CORDIC of about the area of one 16x16 multiplier replaces the four
// multipliers of a rectangular complex multiply.
//
// How it works: a first stage folds the phase into [-pi/2, pi/2) by rotating
// the start vector by pi when the phase lies in the left half plane (start x
// is -mag instead of mag, phase minus pi). STAGES micro-rotation stages then
// follow; stage i turns the vector by +-atan(2^-i) toward a residual angle of
// zero using only shifts and adds. Each stage is one pipeline register.
//
// Scaling: the CORDIC gain K = prod sqrt(1 + 2^-2i), about 1.6468 for 16
// stages, is not removed. It is the same for every sample, so it scales a
// whole beam by a constant and can be absorbed after the IFFT. The outputs are
// therefore RECT_W = MAG_W + 2 bits, signed. X and Y carry GUARD extra
// fraction bits, the residual angle four extra bits, all rounded away at the
// output.
//
// Interface and timing: in_valid/in_tag enter with the sample and leave with
// its result STAGES + 1 clocks later (out_valid/out_tag); the tag carries
// whatever the caller needs aligned with the sample. rst clears the valid
// pipeline only (synchronous, active high).
//
// From the original design: a fully pipelined 16-bit CORDIC doing polar to
// rectangular conversion. The quadrant folding, uncorrected gain, guard bits,
// tag and reset are this design's choices.
module cordic_p2r
  import sonar_pkg::*;
#(
  parameter int unsigned STAGES = CORDIC_STAGES,  // micro-rotations (<= 19 useful)
  parameter int unsigned GUARD  = 3,              // extra X/Y fraction bits
  parameter int unsigned TAG_W  = 1               // side-band width
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  polar_t           in,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output rect_t            out
);

  localparam int unsigned XW = RECT_W + GUARD;   // X/Y datapath width
  localparam int unsigned ZW = PHASE_W + 4;      // residual angle width

  typedef logic signed [XW-1:0] xy_t;
  typedef logic signed [ZW-1:0] z_t;

  // atan(2^-i) as a ZW-bit binary angle: round(atan(2^-i) * 2^ZW / (2*pi)),
  // for ZW = 20. Beyond i = 18 the angle rounds to zero.
  function automatic z_t atan_tab(input int unsigned i);
    case (i)
      0:  return z_t'(131072);
      1:  return z_t'(77376);
      2:  return z_t'(40884);
      3:  return z_t'(20753);
      4:  return z_t'(10417);
      5:  return z_t'(5213);
      6:  return z_t'(2607);
      7:  return z_t'(1304);
      8:  return z_t'(652);
      9:  return z_t'(326);
      10: return z_t'(163);
      11: return z_t'(81);
      12: return z_t'(41);
      13: return z_t'(20);
      14: return z_t'(10);
      15: return z_t'(5);
      16: return z_t'(3);
      17: return z_t'(1);
      18: return z_t'(1);
      default: return z_t'(0);
    endcase
  endfunction

  // Stage registers: index 0 is the folded start vector, index i+1 the
  // vector after micro-rotation i.
  xy_t              x_q   [STAGES+1];
  xy_t              y_q   [STAGES+1];
  z_t               z_q   [STAGES+1];
  logic             v_q   [STAGES+1];
  logic [TAG_W-1:0] tag_q [STAGES+1];

  // Quadrant fold: phases in [pi/2, 3pi/2) have their two top bits unequal.
  logic   left_half;
  phase_t phase_fold;
  xy_t    mag_ext;

  assign left_half  = in.phase[PHASE_W-1] ^ in.phase[PHASE_W-2];
  assign phase_fold = in.phase ^ {left_half, {(PHASE_W-1){1'b0}}};  // minus pi
  assign mag_ext    = xy_t'({2'b00, in.mag, {GUARD{1'b0}}});

  always_ff @(posedge clk) begin
    x_q[0]   <= left_half ? -mag_ext : mag_ext;
    y_q[0]   <= '0;
    z_q[0]   <= z_t'({phase_fold, 4'b0000});
    tag_q[0] <= in_tag;
    for (int i = 0; i < int'(STAGES); i++) begin
      // Rotate toward zero residual angle: counter-clockwise when z >= 0.
      if (!z_q[i][ZW-1]) begin
        x_q[i+1] <= x_q[i] - (y_q[i] >>> i);
        y_q[i+1] <= y_q[i] + (x_q[i] >>> i);
        z_q[i+1] <= z_q[i] - atan_tab(i);
      end else begin
        x_q[i+1] <= x_q[i] + (y_q[i] >>> i);
        y_q[i+1] <= y_q[i] - (x_q[i] >>> i);
        z_q[i+1] <= z_q[i] + atan_tab(i);
      end
      tag_q[i+1] <= tag_q[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i <= int'(STAGES); i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      for (int i = 0; i < int'(STAGES); i++) v_q[i+1] <= v_q[i];
    end
  end

  // Round away the guard bits.
  xy_t x_rnd, y_rnd;
  assign x_rnd = x_q[STAGES] + xy_t'(1 << (GUARD - 1));
  assign y_rnd = y_q[STAGES] + xy_t'(1 << (GUARD - 1));

  assign out.re    = RECT_W'(x_rnd >>> GUARD);
  assign out.im    = RECT_W'(y_rnd >>> GUARD);
  assign out_valid = v_q[STAGES];
  assign out_tag   = tag_q[STAGES];

endmodule
