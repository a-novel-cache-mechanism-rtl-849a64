// nmc_inventory: the inventory of the non-associative FIFO cache system.
//
// One M-bit entry per cache line: the main memory address of the item now
// encached in that line. A cache address therefore names both a line and its
// inventory entry. The cache management unit uses the inventory to return a
// decached item to main memory, to find MANI = MACI + 1 for a next-instruction
// miss, and to tell cache pointers from program items in main memory.
//
// Interface: one asynchronous read port and one synchronous write port; a
// read of the line being written in the same cycle returns the old entry.
// The port arrangement is this design's choice; the published description gives only the
// size (2^c entries of m bits).
module nmc_inventory
  import nmc_pkg::*;
#(
  parameter int unsigned C = C_DEFAULT,
  parameter int unsigned M = M_DEFAULT
) (
  input  logic         clk,
  input  logic [C-1:0] rd_addr,
  output logic [M-1:0] rd_data,
  input  logic         wr_en,
  input  logic [C-1:0] wr_addr,
  input  logic [M-1:0] wr_data
);

  logic [M-1:0] mem [2**C];

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
