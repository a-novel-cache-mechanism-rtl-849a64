// nmc_pkg: types and constants shared by the blocks of the non-associative
// FIFO cache system (execution unit, cache management unit, cache, inventory,
// main memory).
//
// The cache system itself follows the published method; the instruction set below is this
// design's own. The published description only says that the hypothetical computer has
// fixed-length p-bit instructions made of an opcode and one operand (the main
// memory address of the datum, MAD), register/memory instructions with an
// implied register, and branches whose condition is implied by the opcode.
// Here the implied register is an accumulator, the opcode sits in the top
// OPW bits of the item and MAD in its m LSBs.
package nmc_pkg;

  // Default sizes (the published description keeps p, c and m symbolic).
  localparam int unsigned P_DEFAULT = 16;  // item / main memory word width p
  localparam int unsigned C_DEFAULT = 8;   // 2^c cache lines
  localparam int unsigned M_DEFAULT = 12;  // 2^m main memory words

  localparam int unsigned OPW = 4;         // opcode width

  typedef enum logic [OPW-1:0] {
    OP_HALT  = 4'h0,  // stop
    OP_LOAD  = 4'h1,  // acc = datum
    OP_ADD   = 4'h2,  // acc = acc + datum
    OP_SUB   = 4'h3,  // acc = acc - datum
    OP_STORE = 4'h4,  // datum = acc
    OP_BZ    = 4'h5,  // branch to MAD if acc == 0
    OP_BNZ   = 4'h6,  // branch to MAD if acc != 0
    OP_JMP   = 4'h7,  // branch to MAD
    OP_NOP   = 4'h8   // no datum, go to next instruction
  } opcode_e;

  // Which pointer field of the line at CACI scored the miss.
  typedef enum logic {
    MISS_CAD  = 1'b0,
    MISS_CANI = 1'b1
  } miss_kind_e;

  // Field write enables of a cache line.
  typedef struct packed {
    logic wrap;
    logic cani;
    logic cad;
    logic item;
  } line_mask_t;

  // Opcodes that read or write a datum through CAD.
  function automatic logic uses_datum(opcode_e op);
    return op inside {OP_LOAD, OP_ADD, OP_SUB, OP_STORE};
  endfunction

endpackage
