// cordic_p2r_tb: self-checking test of the pipelined polar-to-rectangular
// CORDIC.
//
// Feeds random (magnitude, phase) samples, with random idle clocks, plus the
// axis and diagonal phases at full magnitude. The expected output is computed
// in floating point as K*mag*(cos, sin)(2*pi*phase/2^16), K being the CORDIC
// gain prod sqrt(1 + 2^-2i); each component must lie within TOL LSBs. Each
// result must appear exactly STAGES + 1 clocks after its sample, with its tag,
// and out_valid must be high for exactly the clocks that carry results.
// Every phase quadrant must be exercised.
module cordic_p2r_tb;
  import sonar_pkg::*;

  localparam int unsigned STAGES = CORDIC_STAGES;
  localparam int unsigned TAG_W  = 12;
  localparam int unsigned LAT    = STAGES + 1;
  localparam int          N      = 3000;
  localparam real         TOL    = 6.0;
  localparam real         PI     = 3.14159265358979323846;

  logic             clk = 1'b0;
  logic             rst;
  logic             in_valid;
  logic [TAG_W-1:0] in_tag;
  polar_t           in;
  logic             out_valid;
  logic [TAG_W-1:0] out_tag;
  rect_t            out;

  int checks = 0, failures = 0;
  int quadrant_hits [4];

  cordic_p2r #(.STAGES(STAGES), .TAG_W(TAG_W)) dut (
    .clk, .rst, .in_valid, .in_tag, .in, .out_valid, .out_tag, .out
  );

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
    for (int i = 0; i < int'(STAGES); i++) k = k * $sqrt(1.0 + 2.0 ** (-2.0 * i));
    return k;
  endfunction

  // Per-clock record of what entered, so the output can be checked LAT clocks
  // later.
  typedef struct {
    bit          v;
    int unsigned tag;
    real         re, im;
  } rec_t;

  rec_t hist [$];

  task automatic fail(input string msg);
    failures++;
    if (failures < 12) $display("%s", msg);
  endtask

  initial begin
    automatic real k = gain();
    rst      = 1'b1;
    in_valid = 1'b0;
    in_tag   = '0;
    in       = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < N + int'(LAT); n++) begin
      automatic rec_t r;
      // Compare what leaves now with what entered LAT clocks ago.
      if (hist.size() == LAT) begin
        automatic rec_t e = hist.pop_front();
        checks++;
        if (out_valid !== e.v) fail($sformatf("clock %0d: out_valid %b want %b", n, out_valid, e.v));
        else if (e.v) begin
          automatic real dre = real'(out.re) - e.re;
          automatic real dim = real'(out.im) - e.im;
          if (out_tag !== TAG_W'(e.tag)) fail($sformatf("clock %0d: tag %0d want %0d", n, out_tag, e.tag));
          if (dre > TOL || dre < -TOL || dim > TOL || dim < -TOL)
            fail($sformatf("clock %0d: got (%0d,%0d) want (%f,%f)", n, out.re, out.im, e.re, e.im));
        end
      end
      // Apply the next input.
      if (n < N) begin
        in_valid = (n < 16) || ($urandom_range(0, 3) != 0);
        if (n < 8) begin
          in.mag   = 16'hFFFF;
          in.phase = phase_t'(n * 16'h2000);        // axes and diagonals
        end else begin
          in.mag   = mag_t'($urandom);
          in.phase = phase_t'($urandom);
        end
        in_tag = TAG_W'($urandom);
      end else begin
        in_valid = 1'b0;
      end
      r.v   = in_valid;
      r.tag = int'(in_tag);
      r.re  = k * real'(in.mag) * $cos(2.0 * PI * real'(in.phase) / 65536.0);
      r.im  = k * real'(in.mag) * $sin(2.0 * PI * real'(in.phase) / 65536.0);
      if (in_valid) quadrant_hits[in.phase[15:14]]++;
      hist.push_back(r);
      @(negedge clk);
    end
    foreach (quadrant_hits[q]) begin
      $display("quadrant %0d samples: %0d", q, quadrant_hits[q]);
      if (quadrant_hits[q] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
