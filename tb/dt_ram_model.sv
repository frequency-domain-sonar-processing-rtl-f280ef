// dt_ram_model: behavioural model of the external delay RAM, for testbenches.
//
// Behavioural model, not synthesizable logic of this design: the delay RAM is
// a memory outside the FPGA holding one 16-bit delay per (beam, sensor). To
// keep testbenches free of large data files, the stored word is a fixed
// function of the address,
//     dt(addr) = (addr * 40503 + SEED * 7919 + 12345) mod 2^16,
// which testbenches recompute with dt_of(). A read is synchronous: mem_dt
// holds the word addressed in the clock mem_rd was high, from the next clock
// on.
module dt_ram_model
  import sonar_pkg::*;
#(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned SEED   = 0
) (
  input  logic              clk,
  input  logic              mem_rd,
  input  logic [ADDR_W-1:0] mem_addr,
  output dt_t               mem_dt
);

  function automatic dt_t dt_of(input longint unsigned addr);
    return dt_t'(addr * 40503 + longint'(SEED) * 7919 + 12345);
  endfunction

  initial mem_dt = '0;

  always @(posedge clk) begin
    if (mem_rd) mem_dt <= dt_of(longint'(mem_addr));
  end

endmodule
