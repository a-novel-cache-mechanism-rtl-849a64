// nmc_miss_detect: the miss detection test.
//
// A pointer (CAD or CANI) is a (C+1)-bit logical cache address. Its C LSBs
// select the physical line; its MSB must equal the wraparound bit stored in
// that line when the item there was encached. Equality is a hit, inequality a
// miss: the whole test is a comparison of two bits, as the published analysis proves
// sufficient (a 1-bit wraparound field cannot alias while the instruction
// holding the pointer is itself still in the cache).
//
// Purely combinational: the caller reads the line at line_addr and feeds its
// wraparound bit back as line_wrap.
module nmc_miss_detect
  import nmc_pkg::*;
#(
  parameter int unsigned C = C_DEFAULT
) (
  input  logic [C:0]   ptr,
  output logic [C-1:0] line_addr,
  input  logic         line_wrap,
  output logic         hit
);

  assign line_addr = ptr[C-1:0];
  assign hit       = ~(ptr[C] ^ line_wrap);

endmodule
