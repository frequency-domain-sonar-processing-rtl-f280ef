// pe_control_tb: self-checking test of the PE sequencer.
//
// Sends a sensor-major stream with random idle clocks and checks, for every
// sample, the bin index, the first/last-sensor flags and the delay RAM address
// beam*SENSORS + s against counters kept by the testbench. The beam input
// changes at random but must be taken only at the start of a block. The test
// includes blocks that start by counter wrap without in_sof, and an in_sof
// sent in the middle of a block, which must restart the count and pulse
// resync; each of these must occur at least once.
module pe_control_tb;
  import sonar_pkg::*;

  localparam int unsigned BINS    = 8;
  localparam int unsigned SENSORS = 3;
  localparam int unsigned BEAMS   = 10;
  localparam int unsigned F_W     = $clog2(BINS);
  localparam int unsigned BEAM_W  = $clog2(BEAMS);
  localparam int unsigned ADDR_W  = $clog2(BEAMS * SENSORS);
  localparam int          SAMPLES = 600;

  logic              clk = 1'b0;
  logic              rst;
  logic              in_valid, in_sof;
  logic [BEAM_W-1:0] beam_in;
  logic              mem_rd;
  logic [ADDR_W-1:0] mem_addr;
  logic [F_W-1:0]    f;
  logic              first, last, resync;

  int checks = 0, failures = 0;
  int wrap_starts = 0, sof_starts = 0, resyncs = 0, idles = 0;

  pe_control #(.BINS(BINS), .SENSORS(SENSORS), .BEAMS(BEAMS)) dut (
    .clk, .rst, .in_valid, .in_sof, .beam_in,
    .mem_rd, .mem_addr, .f, .first, .last, .resync
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 12) $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    int s, fi, beam;
    bit mid_sof;
    rst      = 1'b1;
    in_valid = 1'b0;
    in_sof   = 1'b0;
    beam_in  = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    s = 0; fi = 0; beam = 0;
    for (int n = 0; n < SAMPLES; n++) begin
      while ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        in_sof   = 1'($urandom);
        beam_in  = BEAM_W'($urandom_range(0, BEAMS - 1));
        #1;
        expect_eq("mem_rd while idle", int'(mem_rd), 0);
        expect_eq("resync while idle", int'(resync), 0);
        idles++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      beam_in  = BEAM_W'($urandom_range(0, BEAMS - 1));
      // Start of stream, some block starts, and now and then mid-block.
      mid_sof = (n > 40) && (fi != 0 || s != 0) && ($urandom_range(0, 60) == 0);
      in_sof  = (n == 0) || mid_sof || (fi == 0 && s == 0 && $urandom_range(0, 1) == 0);
      if (in_sof) begin
        if (fi != 0 || s != 0) resyncs++;
        s = 0; fi = 0;
      end
      if (fi == 0 && s == 0) begin
        beam = int'(beam_in);
        if (in_sof) sof_starts++; else wrap_starts++;
      end
      #1;
      expect_eq("mem_rd", int'(mem_rd), 1);
      expect_eq("f", int'(f), fi);
      expect_eq("first", int'(first), int'(s == 0));
      expect_eq("last", int'(last), int'(s == int'(SENSORS) - 1));
      expect_eq("mem_addr", int'(mem_addr), beam * int'(SENSORS) + s);
      expect_eq("resync", int'(resync), int'(mid_sof));
      @(negedge clk);
      fi++;
      if (fi == int'(BINS)) begin
        fi = 0;
        s  = (s + 1) % int'(SENSORS);
      end
    end
    $display("blocks started by in_sof %0d, by wrap %0d, resyncs %0d, idle clocks %0d",
             sof_starts, wrap_starts, resyncs, idles);
    if (wrap_starts == 0 || sof_starts == 0 || resyncs == 0 || idles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
