// beamform_fpga_tb: end-to-end test of the beamforming FPGA at its default
// size: two PEs, 256 frequency bins, 64 sensors, delays for 10000 beams.
//
// The testbench plays the FFT stage and the delay RAMs. It broadcasts random
// polar samples, sensor-major, and gives each PE its own beam per block, so
// the two PEs form different beams from the same data. Each PE's delay RAM is
// the behavioural model, with a different seed. For each PE, block and bin it
// computes in floating point
//     sum over s of K * mag * exp(j * 2*pi * ((phase + f*dt[beam][s]) mod 2^16) / 2^16)
// and requires each result within 6 LSBs per sensor, with the right bin
// number, exactly 23 clocks after the last sensor's sample of that bin. One
// block uses beams 0 and 9999, the two ends of the delay address range.
//
// The stream is: a block abandoned partway through sensor 1 by an early
// in_sof (a resync), then full blocks, one of them started by counter wrap
// with no in_sof, one sent back to back and the others with random idle
// clocks. Each of these must happen, as must a phase sum that wraps past one
// turn, shifted phases in all four quadrants, both PEs delivering results in
// the same clock (two CPACs per clock) and results on consecutive clocks.
module beamform_fpga_tb;
  import sonar_pkg::*;

  localparam int unsigned NUM_PE  = DEF_NUM_PE;
  localparam int unsigned BINS    = DEF_BINS;
  localparam int unsigned SENSORS = DEF_SENSORS;
  localparam int unsigned BEAMS   = DEF_BEAMS;
  localparam int unsigned F_W     = $clog2(BINS);
  localparam int unsigned BEAM_W  = $clog2(BEAMS);
  localparam int unsigned ADDR_W  = $clog2(BEAMS * SENSORS);
  localparam int unsigned ACC_W   = RECT_W + $clog2(SENSORS);
  localparam int          LATENCY = 23;
  localparam int          BLOCKS  = 3;     // complete blocks after the resync
  localparam real         TOL     = 6.0 * SENSORS;
  localparam real         PI      = 3.14159265358979323846;

  logic                    clk = 1'b0;
  logic                    rst;
  logic                    in_valid, in_sof;
  polar_t                  in;
  logic [BEAM_W-1:0]       beam_in   [NUM_PE];
  logic                    mem_rd    [NUM_PE];
  logic [ADDR_W-1:0]       mem_addr  [NUM_PE];
  dt_t                     mem_dt    [NUM_PE];
  logic                    out_valid [NUM_PE];
  logic [F_W-1:0]          out_f     [NUM_PE];
  logic signed [ACC_W-1:0] out_re    [NUM_PE];
  logic signed [ACC_W-1:0] out_im    [NUM_PE];
  logic                    resync    [NUM_PE];

  int checks = 0, failures = 0;

  beamform_fpga dut (
    .clk, .rst, .in_valid, .in_sof, .in, .beam_in,
    .mem_rd, .mem_addr, .mem_dt,
    .out_valid, .out_f, .out_re, .out_im, .resync
  );

  for (genvar p = 0; p < int'(NUM_PE); p++) begin : g_ram
    dt_ram_model #(.ADDR_W(ADDR_W), .SEED(p)) u_ram (
      .clk, .mem_rd(mem_rd[p]), .mem_addr(mem_addr[p]), .mem_dt(mem_dt[p])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Same formula as the RAM model's contents.
  function automatic int dt_of(input int p, input int addr);
    return int'((longint'(addr) * 40503 + longint'(p) * 7919 + 12345) % 65536);
  endfunction

  typedef struct {
    int     f;
    real    re, im;
    longint t_last;
  } exp_t;

  exp_t   exp_q [NUM_PE][$];
  longint cycle = 0;

  // Mechanism counters.
  int results [NUM_PE];
  int both_pe_clocks = 0, back_to_back = 0, wraps = 0, idles = 0;
  int quadrant [4];
  int resync_seen = 0, wrap_starts = 0, sof_starts = 0, beam_changes = 0;
  longint prev_out = -10;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (!rst) begin
      for (int p = 0; p < int'(NUM_PE); p++) begin
        if (resync[p]) resync_seen++;
        if (out_valid[p]) begin
          results[p]++;
          checks++;
          if (exp_q[p].size() == 0) begin
            failures++;
            $display("PE %0d: unexpected result for bin %0d", p, out_f[p]);
          end else begin
            automatic exp_t e = exp_q[p].pop_front();
            automatic real dre = real'(out_re[p]) - e.re;
            automatic real dim = real'(out_im[p]) - e.im;
            if (int'(out_f[p]) != e.f || dre > TOL || dre < -TOL || dim > TOL || dim < -TOL) begin
              failures++;
              if (failures < 10) $display("PE %0d bin %0d: got f=%0d (%0d,%0d) want (%f,%f)",
                                          p, e.f, out_f[p], out_re[p], out_im[p], e.re, e.im);
            end
            checks++;
            if (cycle - e.t_last != LATENCY) begin
              failures++;
              if (failures < 10) $display("PE %0d bin %0d: latency %0d want %0d",
                                          p, e.f, cycle - e.t_last, LATENCY);
            end
          end
        end
      end
      if (out_valid[0] && out_valid[1]) both_pe_clocks++;
      if (out_valid[0]) begin
        if (cycle == prev_out + 1) back_to_back++;
        prev_out = cycle;
      end
    end
  end

  real acc_re [NUM_PE][BINS];
  real acc_im [NUM_PE][BINS];
  int  cur_beam [NUM_PE];
  int  prev_beam [NUM_PE];

  // Sends one block. With stop_after >= 0 the block is abandoned after that
  // many samples. use_sof = 0 relies on the counters wrapping.
  task automatic send_block(input int b, input bit use_sof, input bit gaps,
                            input int stop_after);
    automatic real k = gain();
    automatic int  sent = 0;
    for (int p = 0; p < int'(NUM_PE); p++) begin
      prev_beam[p] = cur_beam[p];
      // Block 1 uses the first and the last beam of the delay RAM.
      if (b == 1) cur_beam[p] = (p == 0) ? int'(BEAMS) - 1 : 0;
      else        cur_beam[p] = (b * 3137 + p * 4111 + 17) % int'(BEAMS);
      if (cur_beam[p] != prev_beam[p]) beam_changes++;
    end
    if (use_sof) sof_starts++; else wrap_starts++;
    for (int s = 0; s < int'(SENSORS); s++) begin
      for (int f = 0; f < int'(BINS); f++) begin
        if (stop_after >= 0 && sent == stop_after) return;
        while (gaps && $urandom_range(0, 7) == 0) begin
          in_valid = 1'b0;
          in_sof   = 1'($urandom);
          for (int p = 0; p < int'(NUM_PE); p++) beam_in[p] = BEAM_W'($urandom_range(0, BEAMS - 1));
          idles++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_sof   = use_sof && s == 0 && f == 0;
        in.mag   = mag_t'($urandom);
        in.phase = phase_t'($urandom);
        for (int p = 0; p < int'(NUM_PE); p++) begin
          automatic int dt = dt_of(p, cur_beam[p] * int'(SENSORS) + s);
          automatic int sh = (f * dt) % 65536;
          automatic int ph = (int'(in.phase) + sh) % 65536;
          beam_in[p] = (s == 0 && f == 0) ? BEAM_W'(cur_beam[p])
                                          : BEAM_W'($urandom_range(0, BEAMS - 1));
          if (int'(in.phase) + sh >= 65536) wraps++;
          quadrant[ph / 16384]++;
          if (s == 0) begin
            acc_re[p][f] = 0.0;
            acc_im[p][f] = 0.0;
          end
          acc_re[p][f] += k * real'(in.mag) * $cos(2.0 * PI * real'(ph) / 65536.0);
          acc_im[p][f] += k * real'(in.mag) * $sin(2.0 * PI * real'(ph) / 65536.0);
          if (s == int'(SENSORS) - 1) begin
            automatic exp_t e;
            e.f = f; e.re = acc_re[p][f]; e.im = acc_im[p][f];
            e.t_last = cycle;
            exp_q[p].push_back(e);
          end
        end
        sent++;
        @(negedge clk);
      end
    end
  endtask

  initial begin
    rst      = 1'b1;
    in_valid = 1'b0;
    in_sof   = 1'b0;
    in       = '0;
    foreach (beam_in[p]) begin
      beam_in[p]  = '0;
      cur_beam[p] = -1;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Abandoned block: sensor 0 and half of sensor 1, then a fresh in_sof.
    send_block(100, 1'b1, 1'b1, int'(BINS) + int'(BINS) / 2);
    send_block(0, 1'b1, 1'b1, -1);
    send_block(1, 1'b0, 1'b0, -1);   // starts by wrap, back to back
    send_block(2, 1'b1, 1'b1, -1);
    in_valid = 1'b0;
    in_sof   = 1'b0;
    repeat (LATENCY + 5) @(negedge clk);
    for (int p = 0; p < int'(NUM_PE); p++) begin
      checks++;
      if (results[p] != BLOCKS * int'(BINS) || exp_q[p].size() != 0) begin
        failures++;
        $display("PE %0d: results %0d want %0d", p, results[p], BLOCKS * int'(BINS));
      end
    end
    $display("results per PE %0d; clocks with both PEs delivering %0d; back-to-back %0d",
             results[0], both_pe_clocks, back_to_back);
    $display("idle clocks %0d; wrapped phase sums %0d; quadrants %0d %0d %0d %0d",
             idles, wraps, quadrant[0], quadrant[1], quadrant[2], quadrant[3]);
    $display("resync pulses %0d; blocks started by in_sof %0d, by wrap %0d; beam changes %0d",
             resync_seen, sof_starts, wrap_starts, beam_changes);
    if (both_pe_clocks == 0) begin failures++; $display("no clock with two results"); end
    if (back_to_back == 0)   begin failures++; $display("no back-to-back results"); end
    if (idles == 0)          begin failures++; $display("no idle clocks"); end
    if (wraps == 0)          begin failures++; $display("no wrapped phase sum"); end
    foreach (quadrant[q])
      if (quadrant[q] == 0)  begin failures++; $display("quadrant %0d never used", q); end
    if (resync_seen != NUM_PE) begin failures++; $display("resync count wrong"); end
    if (wrap_starts == 0)    begin failures++; $display("no block started by wrap"); end
    if (beam_changes == 0)   begin failures++; $display("no beam change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
