// complex_accumulator_tb: self-checking test of the per-bin complex
// accumulator.
//
// Sends several blocks of BINS x SENSORS random rectangular samples in
// sensor-major order, with random idle clocks, and keeps its own per-bin sums.
// During the last sensor's pass each result must appear one clock after its
// sample, carry the right bin number and equal the reference sum exactly. The
// first block starts with random memory contents, so a missing "first sensor
// overwrites" shows up as a wrong sum. Full-scale inputs check that the sums
// do not overflow.
module complex_accumulator_tb;
  import sonar_pkg::*;

  localparam int unsigned BINS    = 16;
  localparam int unsigned SENSORS = 5;
  localparam int unsigned F_W     = $clog2(BINS);
  localparam int unsigned ACC_W   = RECT_W + $clog2(SENSORS);
  localparam int          BLOCKS  = 4;

  logic                    clk = 1'b0;
  logic                    rst;
  logic                    in_valid, in_first, in_last;
  logic [F_W-1:0]          in_f;
  rect_t                   in;
  logic                    out_valid;
  logic [F_W-1:0]          out_f;
  logic signed [ACC_W-1:0] out_re, out_im;

  int checks = 0, failures = 0, results = 0;

  complex_accumulator #(.BINS(BINS), .SENSORS(SENSORS)) dut (
    .clk, .rst, .in_valid, .in_f, .in_first, .in_last, .in,
    .out_valid, .out_f, .out_re, .out_im
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ref_re [BINS], ref_im [BINS];

  // Expected output one clock after the current input.
  bit     exp_v;
  int     exp_f;
  longint exp_re, exp_im;

  task automatic check_out();
    checks++;
    if (out_valid !== exp_v) begin
      failures++;
      $display("out_valid %b want %b", out_valid, exp_v);
    end else if (exp_v) begin
      results++;
      if (int'(out_f) != exp_f || longint'(out_re) != exp_re || longint'(out_im) != exp_im) begin
        failures++;
        if (failures < 10)
          $display("bin %0d: got f=%0d (%0d,%0d) want f=%0d (%0d,%0d)", exp_f, out_f,
                   out_re, out_im, exp_f, exp_re, exp_im);
      end
    end
  endtask

  task automatic idle();
    in_valid = 1'b0;
    in_f     = F_W'($urandom);
    in_first = 1'($urandom);
    in_last  = 1'($urandom);
    exp_v    = 1'b0;
    @(negedge clk);
    check_out();
  endtask

  initial begin
    rst      = 1'b1;
    in_valid = 1'b0;
    in       = '0;
    in_f     = '0;
    in_first = 1'b0;
    in_last  = 1'b0;
    exp_v    = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int b = 0; b < BLOCKS; b++) begin
      for (int s = 0; s < int'(SENSORS); s++) begin
        for (int f = 0; f < int'(BINS); f++) begin
          while ($urandom_range(0, 4) == 0) idle();
          in_valid = 1'b1;
          in_f     = F_W'(f);
          in_first = (s == 0);
          in_last  = (s == int'(SENSORS) - 1);
          if (b == 1) begin
            in.re = (f % 2 == 0) ? RECT_W'(131071) : RECT_W'(-131072);
            in.im = (f % 2 == 0) ? RECT_W'(-131072) : RECT_W'(131071);
          end else begin
            in.re = RECT_W'($urandom);
            in.im = RECT_W'($urandom);
          end
          if (s == 0) begin
            ref_re[f] = 0;
            ref_im[f] = 0;
          end
          ref_re[f] += longint'(in.re);
          ref_im[f] += longint'(in.im);
          exp_v  = in_last;
          exp_f  = f;
          exp_re = ref_re[f];
          exp_im = ref_im[f];
          @(negedge clk);
          check_out();
        end
      end
    end
    idle();
    idle();
    if (results != BLOCKS * int'(BINS)) begin
      failures++;
      $display("results %0d want %0d", results, BLOCKS * int'(BINS));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
