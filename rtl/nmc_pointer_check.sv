// nmc_pointer_check: tells a cache pointer from a program item in a main
// memory word, without an extra tag bit per word.
//
// When the cache management unit reads word W at address MA it takes the C
// LSBs of W as a cache address CA and looks up the inventory entry at CA. If
// that entry equals MA, the item of MA is in the cache at CA, so W must be the
// pointer left there at encache time; otherwise W is the item itself. The
// logical address of the line ({wrap, CA}, C+1 bits) is the (C+1) LSBs of
// the pointer, i.e. the value DA had when the item was encached.
//
// Purely combinational: ca goes to the inventory read port and the entry read
// there comes back on inv_entry. This requires every inventory entry to hold
// the address of a real encached word, which the cache management unit
// ensures by filling the whole cache after reset.
module nmc_pointer_check
  import nmc_pkg::*;
#(
  parameter int unsigned P = P_DEFAULT,
  parameter int unsigned C = C_DEFAULT,
  parameter int unsigned M = M_DEFAULT
) (
  input  logic [M-1:0] ma,
  input  logic [P-1:0] word,
  output logic [C-1:0] ca,
  input  logic [M-1:0] inv_entry,
  output logic         is_pointer,
  output logic [C:0]   ptr
);

  assign ca         = word[C-1:0];
  assign ptr        = word[C:0];
  assign is_pointer = (inv_entry == ma);

endmodule
