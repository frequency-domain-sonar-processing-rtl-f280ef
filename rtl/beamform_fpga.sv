// beamform_fpga: one beamforming FPGA, NUM_PE processing elements (two by
// default) sharing one broadcast frequency-bin stream.
//
// The FFT stage (outside this design) sends every sensor's spectrum, in
// sensor-major order, to all PEs at once. Each PE forms its own beam from the
// same samples, so the chip performs NUM_PE complex phase-shift/accumulate
// operations per clock: at 40 MHz and two PEs, 80 million per second. Every
// PE has its own port to a delay RAM holding one delay per (beam, sensor),
// and its own result_f output toward the IFFT stage.
//
// Interface: in_valid/in_sof/in is the broadcast stream; beam_in[p] is the
// beam PE p forms, presented with the first sample of each block (it is
// registered together with the stream); mem_rd[p]/mem_addr[p] read PE p's delay
// RAM, whose data mem_dt[p] must follow one clock after the read;
// out_valid[p], out_f[p], out_re[p], out_im[p] carry PE p's beam response,
// one bin per clock during the last sensor's pass, 23 clocks after the
// sample enters (one input register plus the PE's 22). resync[p] pulses when
// in_sof re-aligns PE p's counters.
//
// Two PEs per chip is the original design's configuration; the per-PE
// delay RAM ports and the per-PE beam selection are this design's choices.
module beamform_fpga
  import sonar_pkg::*;
#(
  parameter int unsigned NUM_PE  = DEF_NUM_PE,
  parameter int unsigned BINS    = DEF_BINS,
  parameter int unsigned SENSORS = DEF_SENSORS,
  parameter int unsigned BEAMS   = DEF_BEAMS,
  parameter int unsigned F_W     = $clog2(BINS),
  parameter int unsigned BEAM_W  = (BEAMS > 1) ? $clog2(BEAMS) : 1,
  parameter int unsigned ADDR_W  = $clog2(BEAMS * SENSORS),
  parameter int unsigned ACC_W   = RECT_W + $clog2(SENSORS)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic                    in_sof,
  input  polar_t                  in,
  input  logic [BEAM_W-1:0]       beam_in   [NUM_PE],
  output logic                    mem_rd    [NUM_PE],
  output logic [ADDR_W-1:0]       mem_addr  [NUM_PE],
  input  dt_t                     mem_dt    [NUM_PE],
  output logic                    out_valid [NUM_PE],
  output logic [F_W-1:0]          out_f     [NUM_PE],
  output logic signed [ACC_W-1:0] out_re    [NUM_PE],
  output logic signed [ACC_W-1:0] out_im    [NUM_PE],
  output logic                    resync    [NUM_PE]
);

  // The broadcast bus is registered once at the chip edge and fanned out;
  // the beam selections are registered with it so that they stay aligned.
  logic              bc_valid, bc_sof;
  polar_t            bc;
  logic [BEAM_W-1:0] bc_beam [NUM_PE];

  always_ff @(posedge clk) begin
    if (rst) begin
      bc_valid <= 1'b0;
      bc_sof   <= 1'b0;
    end else begin
      bc_valid <= in_valid;
      bc_sof   <= in_sof;
    end
    bc      <= in;
    bc_beam <= beam_in;
  end

  for (genvar p = 0; p < int'(NUM_PE); p++) begin : g_pe
    beamform_pe #(
      .BINS(BINS), .SENSORS(SENSORS), .BEAMS(BEAMS),
      .F_W(F_W), .BEAM_W(BEAM_W), .ADDR_W(ADDR_W), .ACC_W(ACC_W)
    ) u_pe (
      .clk, .rst,
      .in_valid(bc_valid), .in_sof(bc_sof), .in(bc),
      .beam_in(bc_beam[p]),
      .mem_rd(mem_rd[p]), .mem_addr(mem_addr[p]), .mem_dt(mem_dt[p]),
      .out_valid(out_valid[p]), .out_f(out_f[p]),
      .out_re(out_re[p]), .out_im(out_im[p]),
      .resync(resync[p])
    );
  end

endmodule
