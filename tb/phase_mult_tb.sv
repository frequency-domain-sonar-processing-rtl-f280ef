// phase_mult_tb: self-checking test of the weight-phase multiplier.
//
// Drives a new random (f, dt) pair every clock, including the extreme values,
// and checks that omega equals (f*dt) mod 2^16 exactly STAGES clocks later,
// i.e. that the unit accepts one product per clock at the stated latency.
module phase_mult_tb;
  import sonar_pkg::*;

  localparam int unsigned F_W    = 8;
  localparam int unsigned STAGES = 2;
  localparam int unsigned N      = 2000;

  logic           clk = 1'b0;
  logic [F_W-1:0] f;
  dt_t            dt;
  phase_t         omega;

  int checks = 0, failures = 0;

  phase_mult #(.F_W(F_W), .STAGES(STAGES)) dut (.clk, .f, .dt, .omega);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected value of each product, indexed by the clock it was applied.
  int unsigned exp_q [$];

  initial begin
    f  = '0;
    dt = '0;
    for (int n = 0; n < int'(N + STAGES); n++) begin
      @(negedge clk);
      if (n < int'(N)) begin
        case (n)
          0:       begin f = '1; dt = '1; end
          1:       begin f = '0; dt = '1; end
          2:       begin f = 8'd1; dt = 16'h8000; end
          default: begin f = F_W'($urandom); dt = dt_t'($urandom); end
        endcase
        exp_q.push_back((int'(f) * int'(dt)) & 32'hFFFF);
      end
      // The product applied STAGES clocks ago is due now.
      if (n >= int'(STAGES)) begin
        automatic int unsigned e = exp_q.pop_front();
        checks++;
        if (omega !== phase_t'(e)) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: got %h want %h", n, omega, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
