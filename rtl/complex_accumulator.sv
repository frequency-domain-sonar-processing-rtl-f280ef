// complex_accumulator: per-bin complex accumulation of one beam.
//
// The broadcast stream carries all frequency bins of sensor 0, then all bins
// of sensor 1, and so on. For every bin f the accumulator keeps a running
// complex sum response[f] over the sensors seen so far, held in a BINS-entry
// memory (one real and one imaginary word per bin). A sample flagged
// in_first (sensor 0) overwrites its bin's entry, so no clearing pass is
// needed between beams; later samples are added to it with two adders. The
// sample flagged in_last (the final sensor) completes the bin: its sum leaves
// as result_f and is not written back.
//
// Each bin is read and rewritten in the same clock (combinational read,
// registered write), so back-to-back samples of any bin order are safe.
//
// Interface and timing: one sample per clock in, one result per clock out
// during the last sensor's pass; a result appears one clock after its last
// sample. Sums are ACC_W = RECT_W + clog2(SENSORS) bits and cannot overflow.
// rst clears out_valid only (synchronous, active high).
//
// From the original design: the complex accumulator producing result_f,
// and the accumulation order of its pseudo-code (sensors outer, bins inner).
// The memory organisation, the first/last flags and the widths are this
// design's choices.
module complex_accumulator
  import sonar_pkg::*;
#(
  parameter int unsigned BINS    = DEF_BINS,
  parameter int unsigned SENSORS = DEF_SENSORS,
  parameter int unsigned F_W     = $clog2(BINS),
  parameter int unsigned ACC_W   = RECT_W + $clog2(SENSORS)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [F_W-1:0]          in_f,      // frequency bin of the sample
  input  logic                    in_first,  // sample of the first sensor
  input  logic                    in_last,   // sample of the last sensor
  input  rect_t                   in,
  output logic                    out_valid,
  output logic [F_W-1:0]          out_f,
  output logic signed [ACC_W-1:0] out_re,
  output logic signed [ACC_W-1:0] out_im
);

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t acc_re [BINS];
  acc_t acc_im [BINS];

  acc_t base_re, base_im, sum_re, sum_im;

  // The first sensor starts a fresh sum; the others add to the stored one.
  assign base_re = in_first ? '0 : acc_re[in_f];
  assign base_im = in_first ? '0 : acc_im[in_f];
  assign sum_re  = base_re + acc_t'(in.re);
  assign sum_im  = base_im + acc_t'(in.im);

  always_ff @(posedge clk) begin
    if (in_valid && !in_last) begin
      acc_re[in_f] <= sum_re;
      acc_im[in_f] <= sum_im;
    end
  end

  always_ff @(posedge clk) begin
    out_f  <= in_f;
    out_re <= sum_re;
    out_im <= sum_im;
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid && in_last;
  end

endmodule
