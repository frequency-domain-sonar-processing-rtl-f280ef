// beamform_pe: one frequency-domain beamforming processing element.
//
// For one beam b the PE computes, for every frequency bin f,
//     response[f] = sum over sensors s of  w[b][s][f] * X[s][f],
// the complex phase-shift/accumulate (CPAC) step between the per-sensor FFTs
// and the per-beam IFFT. It does one CPAC per clock, fully pipelined.
//
// The sample X[s][f] arrives in polar form (16-bit magnitude, 16-bit phase)
// on a bus broadcast to all PEs. The weight is exp(j*omega) with
// omega = f*dt[b][s], so rather than a weight per bin only one delay dt per
// (beam, sensor) is kept in an external RAM. The datapath follows the block
// diagram of the PE:
//   pe_control  counts (s, f) of the stream, addresses the delay RAM and
//               supplies f on chip
//   phase_mult  omega = f * dt            (weight phase, mod one turn)
//   phase_adder phase + omega             (the phase shift)
//   cordic_p2r  (mag, phase) -> (re, im)  (polar to rectangular)
//   complex_accumulator  sum over sensors per bin, emits result_f
//
// Interface: in_valid/in_sof/in carry the broadcast stream (sensor-major,
// see pe_control); beam_in selects the beam of the next block. mem_rd and
// mem_addr read the delay RAM, which must return mem_dt exactly one clock
// after the read (a synchronous RAM). out_valid/out_f/out_re/out_im carry
// result_f for each bin during the last sensor's pass; the values are scaled
// by the CORDIC gain (about 1.647).
//
// Timing: one sample per clock, idle clocks allowed anywhere. A result leaves
// LATENCY = 1 + MUL_STAGES + 1 + (CORDIC_STAGES + 1) + 1 clocks (22 by
// default) after the last sensor's sample for that bin.
//
// The blocks and their order are those of the original design; the stage
// counts, RAM timing and framing are this design's choices.
module beamform_pe
  import sonar_pkg::*;
#(
  parameter int unsigned BINS       = DEF_BINS,
  parameter int unsigned SENSORS    = DEF_SENSORS,
  parameter int unsigned BEAMS      = DEF_BEAMS,
  parameter int unsigned MUL_STAGES = 2,
  parameter int unsigned F_W        = $clog2(BINS),
  parameter int unsigned BEAM_W     = (BEAMS > 1) ? $clog2(BEAMS) : 1,
  parameter int unsigned ADDR_W     = $clog2(BEAMS * SENSORS),
  parameter int unsigned ACC_W      = RECT_W + $clog2(SENSORS)
) (
  input  logic                    clk,
  input  logic                    rst,
  // broadcast frequency-bin stream
  input  logic                    in_valid,
  input  logic                    in_sof,
  input  polar_t                  in,
  // beam selection
  input  logic [BEAM_W-1:0]       beam_in,
  // delay RAM port
  output logic                    mem_rd,
  output logic [ADDR_W-1:0]       mem_addr,
  input  dt_t                     mem_dt,
  // result_f
  output logic                    out_valid,
  output logic [F_W-1:0]          out_f,
  output logic signed [ACC_W-1:0] out_re,
  output logic signed [ACC_W-1:0] out_im,
  // status
  output logic                    resync
);

  // Side-band fields that travel with a sample through the pipeline.
  typedef struct packed {
    logic           valid;
    logic [F_W-1:0] f;
    logic           first;
    logic           last;
  } tag_t;

  typedef struct packed {
    tag_t   tag;
    polar_t x;
  } sample_t;

  // ---- control -----------------------------------------------------------
  logic [F_W-1:0] ctl_f;
  logic           ctl_first, ctl_last;

  pe_control #(
    .BINS(BINS), .SENSORS(SENSORS), .BEAMS(BEAMS),
    .F_W(F_W), .BEAM_W(BEAM_W), .ADDR_W(ADDR_W)
  ) u_ctl (
    .clk, .rst,
    .in_valid, .in_sof, .beam_in,
    .mem_rd, .mem_addr,
    .f(ctl_f), .first(ctl_first), .last(ctl_last),
    .resync
  );

  // ---- stage A: hold the sample while the delay RAM is read --------------
  sample_t s_in, s_a, s_b;

  assign s_in.tag.valid = in_valid;
  assign s_in.tag.f     = ctl_f;
  assign s_in.tag.first = ctl_first;
  assign s_in.tag.last  = ctl_last;
  assign s_in.x         = in;

  pipe_delay #(.W($bits(sample_t)), .DEPTH(1)) u_dly_a (
    .clk, .rst, .in(s_in), .out(s_a)
  );

  // ---- weight phase omega = f * dt ---------------------------------------
  phase_t omega;

  phase_mult #(.F_W(F_W), .STAGES(MUL_STAGES)) u_mult (
    .clk, .f(s_a.tag.f), .dt(mem_dt), .omega
  );

  pipe_delay #(.W($bits(sample_t)), .DEPTH(MUL_STAGES)) u_dly_b (
    .clk, .rst, .in(s_a), .out(s_b)
  );

  // ---- phase shift -------------------------------------------------------
  polar_t shifted;
  tag_t   tag_c;

  phase_adder u_add (
    .clk, .in(s_b.x), .omega, .out(shifted)
  );

  pipe_delay #(.W($bits(tag_t)), .DEPTH(1)) u_dly_c (
    .clk, .rst, .in(s_b.tag), .out(tag_c)
  );

  // ---- polar to rectangular ----------------------------------------------
  localparam int unsigned TAG_W = F_W + 2;

  logic             rect_valid;
  logic [TAG_W-1:0] rect_tag;
  rect_t            rect;

  cordic_p2r #(.STAGES(CORDIC_STAGES), .TAG_W(TAG_W)) u_cordic (
    .clk, .rst,
    .in_valid(tag_c.valid),
    .in_tag({tag_c.f, tag_c.first, tag_c.last}),
    .in(shifted),
    .out_valid(rect_valid), .out_tag(rect_tag), .out(rect)
  );

  // ---- accumulation over sensors -----------------------------------------
  complex_accumulator #(
    .BINS(BINS), .SENSORS(SENSORS), .F_W(F_W), .ACC_W(ACC_W)
  ) u_acc (
    .clk, .rst,
    .in_valid(rect_valid),
    .in_f(rect_tag[TAG_W-1:2]),
    .in_first(rect_tag[1]),
    .in_last(rect_tag[0]),
    .in(rect),
    .out_valid, .out_f, .out_re, .out_im
  );

endmodule
