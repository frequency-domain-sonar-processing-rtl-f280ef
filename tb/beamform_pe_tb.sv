// beamform_pe_tb: end-to-end test of one beamforming PE with its delay RAM.
//
// Streams BLOCKS blocks of random polar frequency-bin samples (sensor-major,
// random idle clocks) into the PE, selecting a different beam for each block.
// The delay RAM is the behavioural model, whose contents are a formula. For
// each block and bin the testbench computes in floating point
//     sum over s of K * mag * exp(j * 2*pi * ((phase + f*dt[beam][s]) mod 2^16) / 2^16)
// and requires each result component to be within SENSORS * 6 LSBs, the bin
// number to match, and each result to leave exactly 22 clocks after the last
// sensor's sample of its bin. It also requires results on consecutive clocks
// (one CPAC per clock) and a phase sum that wraps past one turn.
module beamform_pe_tb;
  import sonar_pkg::*;

  localparam int unsigned BINS    = 16;
  localparam int unsigned SENSORS = 4;
  localparam int unsigned BEAMS   = 6;
  localparam int unsigned F_W     = $clog2(BINS);
  localparam int unsigned BEAM_W  = $clog2(BEAMS);
  localparam int unsigned ADDR_W  = $clog2(BEAMS * SENSORS);
  localparam int unsigned ACC_W   = RECT_W + $clog2(SENSORS);
  localparam int          LATENCY = 22;
  localparam int          BLOCKS  = 4;
  localparam real         TOL     = 6.0 * SENSORS;
  localparam real         PI      = 3.14159265358979323846;

  logic                    clk = 1'b0;
  logic                    rst;
  logic                    in_valid, in_sof;
  polar_t                  in;
  logic [BEAM_W-1:0]       beam_in;
  logic                    mem_rd;
  logic [ADDR_W-1:0]       mem_addr;
  dt_t                     mem_dt;
  logic                    out_valid;
  logic [F_W-1:0]          out_f;
  logic signed [ACC_W-1:0] out_re, out_im;
  logic                    resync;

  int checks = 0, failures = 0;

  beamform_pe #(.BINS(BINS), .SENSORS(SENSORS), .BEAMS(BEAMS)) dut (
    .clk, .rst, .in_valid, .in_sof, .in, .beam_in,
    .mem_rd, .mem_addr, .mem_dt,
    .out_valid, .out_f, .out_re, .out_im, .resync
  );

  dt_ram_model #(.ADDR_W(ADDR_W)) u_ram (.clk, .mem_rd, .mem_addr, .mem_dt);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gain();
    real k = 1.0;
    for (int i = 0; i < int'(CORDIC_STAGES); i++) k = k * $sqrt(1.0 + 2.0 ** (-2.0 * i));
    return k;
  endfunction

  // Expected results, in output order.
  typedef struct {
    int  f;
    real re, im;
    longint t_last;   // clock of the last sensor's sample
  } exp_t;

  exp_t   exp_q [$];
  longint cycle = 0;
  int     results = 0, back_to_back = 0, wraps = 0;
  longint prev_out = -10;

  always @(posedge clk) cycle <= cycle + 1;

  // Output checker.
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      results++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected result for bin %0d", out_f);
      end else begin
        automatic exp_t e = exp_q.pop_front();
        automatic real dre = real'(out_re) - e.re;
        automatic real dim = real'(out_im) - e.im;
        if (int'(out_f) != e.f || dre > TOL || dre < -TOL || dim > TOL || dim < -TOL) begin
          failures++;
          if (failures < 10) $display("bin %0d: got f=%0d (%0d,%0d) want (%f,%f)",
                                      e.f, out_f, out_re, out_im, e.re, e.im);
        end
        checks++;
        if (cycle - e.t_last != LATENCY) begin
          failures++;
          if (failures < 10) $display("bin %0d: latency %0d want %0d", e.f, cycle - e.t_last, LATENCY);
        end
      end
      if (cycle == prev_out + 1) back_to_back++;
      prev_out = cycle;
    end
  end

  initial begin
    automatic real k = gain();
    real acc_re [BINS], acc_im [BINS];
    rst      = 1'b1;
    in_valid = 1'b0;
    in_sof   = 1'b0;
    in       = '0;
    beam_in  = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int b = 0; b < BLOCKS; b++) begin
      automatic int beam = (b * 5 + 1) % int'(BEAMS);
      for (int s = 0; s < int'(SENSORS); s++) begin
        automatic int dt = int'(u_ram.dt_of(longint'(beam * int'(SENSORS) + s)));
        for (int f = 0; f < int'(BINS); f++) begin
          automatic int ph;
          // Idle clocks, except in block 2 which runs back to back.
          while (b != 2 && $urandom_range(0, 3) == 0) begin
            in_valid = 1'b0;
            in_sof   = 1'b0;
            beam_in  = BEAM_W'($urandom_range(0, BEAMS - 1));
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_sof   = (s == 0 && f == 0);
          beam_in  = (s == 0 && f == 0) ? BEAM_W'(beam) : BEAM_W'($urandom_range(0, BEAMS - 1));
          in.mag   = mag_t'($urandom);
          in.phase = phase_t'($urandom);
          if (int'(in.phase) + ((f * dt) % 65536) >= 65536) wraps++;
          ph = (int'(in.phase) + f * dt) % 65536;
          if (s == 0) begin
            acc_re[f] = 0.0;
            acc_im[f] = 0.0;
          end
          acc_re[f] += k * real'(in.mag) * $cos(2.0 * PI * real'(ph) / 65536.0);
          acc_im[f] += k * real'(in.mag) * $sin(2.0 * PI * real'(ph) / 65536.0);
          if (s == int'(SENSORS) - 1) begin
            automatic exp_t e;
            e.f = f; e.re = acc_re[f]; e.im = acc_im[f];
            e.t_last = cycle;   // clock in which the sample is presented
            exp_q.push_back(e);
          end
          @(negedge clk);
        end
      end
    end
    in_valid = 1'b0;
    in_sof   = 1'b0;
    repeat (LATENCY + 5) @(negedge clk);
    checks++;
    if (results != BLOCKS * int'(BINS) || exp_q.size() != 0) begin
      failures++;
      $display("results %0d want %0d", results, BLOCKS * int'(BINS));
    end
    $display("results %0d, back-to-back results %0d, wrapped phase sums %0d",
             results, back_to_back, wraps);
    if (back_to_back == 0 || wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
