// pe_control: sequencer of one beamforming PE (the "Control" block).
//
// The frequency-bin stream is broadcast to every PE in sensor-major order:
// bins 0..BINS-1 of sensor 0, then of sensor 1, up to sensor SENSORS-1; that
// is one block, and it forms one beam in each PE. The control counts the
// position (sensor s, bin f) of every valid sample and from it produces
//   * the on-chip bin index f fed to the weight-phase multiplier,
//   * the delay RAM address mem_addr = beam*SENSORS + s, so the RAM holds one
//     delay per (beam, sensor) pair,
//   * first/last flags (s = 0, s = SENSORS-1) that steer the accumulator.
//
// The beam number is sampled from beam_in on the first sample of each block
// and held for the rest of it. in_sof marks the first sample of a block; it
// forces the position to (0, 0) and so re-aligns the counters if the stream
// ever slips. A block also starts without in_sof when the counters wrap.
// resync pulses when in_sof arrives while the counters were elsewhere.
//
// Timing: all outputs are combinational from the counters and the current
// input, valid in the same clock as the sample; the delay RAM is expected to
// answer one clock later. Samples may arrive with idle clocks between them
// (in_valid low); the counters simply wait. rst (synchronous, active high)
// sets the position to (0, 0).
//
// From the original design: a control block driving the RAM address, the
// bin index generated on chip, and the loop order of its pseudo-code. The
// address layout, framing signal, resync and beam selection are this design's
// choices.
module pe_control
  import sonar_pkg::*;
#(
  parameter int unsigned BINS    = DEF_BINS,
  parameter int unsigned SENSORS = DEF_SENSORS,
  parameter int unsigned BEAMS   = DEF_BEAMS,
  parameter int unsigned F_W     = $clog2(BINS),
  parameter int unsigned S_W     = (SENSORS > 1) ? $clog2(SENSORS) : 1,
  parameter int unsigned BEAM_W  = (BEAMS > 1) ? $clog2(BEAMS) : 1,
  parameter int unsigned ADDR_W  = $clog2(BEAMS * SENSORS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,   // a broadcast sample is present
  input  logic              in_sof,     // it is the first sample of a block
  input  logic [BEAM_W-1:0] beam_in,    // beam to form in the next block
  output logic              mem_rd,     // read the delay RAM
  output logic [ADDR_W-1:0] mem_addr,   // delay RAM address
  output logic [F_W-1:0]    f,          // bin index of the current sample
  output logic              first,      // current sample is of sensor 0
  output logic              last,       // current sample is of the last sensor
  output logic              resync      // in_sof re-aligned the counters
);

  logic [F_W-1:0]    f_cnt;
  logic [S_W-1:0]    s_cnt;
  logic [BEAM_W-1:0] beam_q;

  logic              at_start;
  logic [F_W-1:0]    cur_f;
  logic [S_W-1:0]    cur_s;
  logic [BEAM_W-1:0] cur_beam;

  assign at_start = in_sof || (f_cnt == '0 && s_cnt == '0);
  assign cur_f    = in_sof ? '0 : f_cnt;
  assign cur_s    = in_sof ? '0 : s_cnt;
  assign cur_beam = at_start ? beam_in : beam_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      f_cnt  <= '0;
      s_cnt  <= '0;
      beam_q <= '0;
    end else if (in_valid) begin
      beam_q <= cur_beam;
      if (cur_f == F_W'(BINS - 1)) begin
        f_cnt <= '0;
        s_cnt <= (cur_s == S_W'(SENSORS - 1)) ? '0 : cur_s + 1'b1;
      end else begin
        f_cnt <= cur_f + 1'b1;
        s_cnt <= cur_s;
      end
    end
  end

  assign mem_rd   = in_valid;
  assign mem_addr = ADDR_W'(cur_beam) * ADDR_W'(SENSORS) + ADDR_W'(cur_s);
  assign f        = cur_f;
  assign first    = (cur_s == '0);
  assign last     = (cur_s == S_W'(SENSORS - 1));
  assign resync   = in_valid && in_sof && !(f_cnt == '0 && s_cnt == '0);

  // A beam number past the end of the delay RAM has no delays stored.
  a_beam_in_range: assert property (@(posedge clk) disable iff (rst)
    (in_valid && at_start) |-> (beam_in < BEAM_W'(BEAMS)));

endmodule
