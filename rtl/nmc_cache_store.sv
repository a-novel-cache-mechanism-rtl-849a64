// nmc_cache_store: the cache of the non-associative FIFO cache system.
//
// 2^C lines, each holding one item (instruction or datum, P bits) plus the
// 2C+3 bits that make non-associative operation possible:
//   CAD  (C+1 bits)  logical cache address of the instruction's datum
//   CANI (C+1 bits)  logical cache address of the next instruction
//   WRAP (1 bit)     wraparound bit of DA when the item was encached
// The line is P+2C+3 bits wide, as published; the packed field order, MSB
// first {wrap, cani, cad, item}, is this design's choice.
//
// The store is random access: NR asynchronous (combinational) read ports
// and NW synchronous write ports. Each write port has a per-field enable
// (item, cad, cani, wrap) so that a pointer field can be updated without
// touching the item, as the cache management unit does when it links an
// item to an instruction. If two write ports address the same line in one
// cycle the higher-numbered port wins per field; in this system the
// execution unit and the cache management unit never write together. The
// number of ports and the write-enable granularity are this design's choice.
module nmc_cache_store
  import nmc_pkg::*;
#(
  parameter int unsigned P  = P_DEFAULT,
  parameter int unsigned C  = C_DEFAULT,
  parameter int unsigned NR = 4,
  parameter int unsigned NW = 2
) (
  input  logic                              clk,
  input  logic [NR-1:0][C-1:0]              rd_addr,
  output logic [NR-1:0][P+2*C+2:0]          rd_line,
  input  logic [NW-1:0]                     wr_en,
  input  logic [NW-1:0][C-1:0]              wr_addr,
  input  line_mask_t [NW-1:0]               wr_mask,
  input  logic [NW-1:0][P+2*C+2:0]          wr_line
);

  typedef struct packed {
    logic         wrap;
    logic [C:0]   cani;
    logic [C:0]   cad;
    logic [P-1:0] item;
  } line_t;

  line_t mem [2**C];

  always_comb begin
    for (int r = 0; r < int'(NR); r++) rd_line[r] = mem[rd_addr[r]];
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < int'(NW); w++) begin
      if (wr_en[w]) begin
        line_t nl;
        nl = line_t'(wr_line[w]);
        if (wr_mask[w].item) mem[wr_addr[w]].item <= nl.item;
        if (wr_mask[w].cad)  mem[wr_addr[w]].cad  <= nl.cad;
        if (wr_mask[w].cani) mem[wr_addr[w]].cani <= nl.cani;
        if (wr_mask[w].wrap) mem[wr_addr[w]].wrap <= nl.wrap;
      end
    end
  end

endmodule
