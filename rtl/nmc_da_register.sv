// nmc_da_register: the Decache Address register (DA) of the cache
// management unit.
//
// DA names the line to be decached next; incrementing it after each encache,
// with wraparound, makes the cache a cyclic FIFO. DA is C+1 bits wide: its C
// LSBs are the physical line address and its MSB is the wraparound bit, the
// parity of the number of wraparounds since reset. Read as a logical address
// on the quasi-infinite stack, only the top 2^C positions below DA are valid.
//
// Interface: inc advances DA on the rising clock edge; rst_n (synchronous,
// active low) clears it to 0. Reset value and reset style are this design's
// choice.
module nmc_da_register
  import nmc_pkg::*;
#(
  parameter int unsigned C = C_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  output logic [C:0]   da
);

  always_ff @(posedge clk) begin
    if (!rst_n)   da <= '0;
    else if (inc) da <= da + 1'b1;  // (C+1)-bit wraparound
  end

endmodule
