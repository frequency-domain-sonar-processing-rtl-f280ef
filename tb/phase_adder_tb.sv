// phase_adder_tb: self-checking test of the phase-shift adder.
//
// Applies random samples and weight phases, one per clock, and checks one
// clock later that the magnitude is unchanged and the phase is the sum modulo
// one turn (2^16). Counts how many sums wrapped past one turn.
module phase_adder_tb;
  import sonar_pkg::*;

  localparam int N = 2000;

  logic   clk = 1'b0;
  polar_t in, out;
  phase_t omega;

  int checks = 0, failures = 0, wraps = 0;

  phase_adder dut (.clk, .in, .omega, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned prev_mag, prev_sum;
    in    = '0;
    omega = '0;
    for (int n = 0; n <= N; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (out.mag !== mag_t'(prev_mag) || out.phase !== phase_t'(prev_sum)) begin
          failures++;
          if (failures < 10)
            $display("mismatch at %0d: got %h/%h want %h/%h", n, out.mag, out.phase,
                     prev_mag, prev_sum & 32'hFFFF);
        end
      end
      in.mag   = mag_t'($urandom);
      in.phase = phase_t'($urandom);
      omega    = phase_t'($urandom);
      prev_mag = int'(in.mag);
      prev_sum = (int'(in.phase) + int'(omega)) % 65536;
      if (int'(in.phase) + int'(omega) >= 65536) wraps++;
    end
    if (wraps == 0) failures++;
    $display("phase sums that wrapped: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
