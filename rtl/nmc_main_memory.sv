// nmc_main_memory: random access main memory of 2^M words of P bits.
//
// Programs are loaded here as if there were no cache. Once an item is
// encached, its word holds a pointer to its cache line instead (the (1+C)-bit
// value of DA at encache time, zero-extended), and the item comes back when
// it is decached.
//
// Single port, synchronous: the address and write data are sampled on the
// rising clock edge; a read returns the word on rd_data one cycle later
// (read-before-write when both happen on the same address). The timing is
// this design's choice; the published description only calls the memory random access.
module nmc_main_memory
  import nmc_pkg::*;
#(
  parameter int unsigned P = P_DEFAULT,
  parameter int unsigned M = M_DEFAULT
) (
  input  logic         clk,
  input  logic [M-1:0] addr,
  input  logic         we,
  input  logic [P-1:0] wdata,
  output logic [P-1:0] rdata
);

  logic [P-1:0] mem [2**M];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
