// nmc_top: a small computer built around the non-associative FIFO cache.
//
// Blocks and connections follow the system diagram of the design: the
// execution unit (EU) talks only to the cache; the cache management unit
// (CMU) sits between the cache, the inventory and main memory and is called
// by the EU on a miss. The cache holds 2^C lines of P+2C+3 bits, the
// inventory 2^C entries of M bits, main memory 2^M words of P bits.
//
// Cache ports: read ports 0-2 belong to the EU (instruction, CAD line, CANI
// line), read port 3 to the CMU; write port 0 to the CMU, write port 1 to
// the EU (stores). The EU is stalled while the CMU works, so the two never
// write together.
//
// Use: hold load_en high and write the program into main memory through
// load_addr/load_wdata/load_we (load_rdata returns the word addressed in the
// previous cycle); while load_en is high the EU and CMU are held in reset.
// After load_en falls the CMU fills the cache from words 0 .. 2^C-1 (ready
// rises after 2*2^C cycles) and the EU starts executing the instruction in
// word 0. halted rises on a HALT instruction. The load port and the event
// outputs (one-cycle pulses) are this design's additions for loading and
// observing the system.
module nmc_top
  import nmc_pkg::*;
#(
  parameter int unsigned P = P_DEFAULT,
  parameter int unsigned C = C_DEFAULT,
  parameter int unsigned M = M_DEFAULT
) (
  input  logic          clk,
  input  logic          rst_n,
  // program load / memory inspection
  input  logic          load_en,
  input  logic          load_we,
  input  logic [M-1:0]  load_addr,
  input  logic [P-1:0]  load_wdata,
  output logic [P-1:0]  load_rdata,
  // status
  output logic          ready,
  output logic          halted,
  output logic [P-1:0]  acc,
  output logic [C-1:0]  caci,
  output logic [C:0]    da,
  // events
  output logic          ev_retire,
  output logic          ev_cad_miss,
  output logic          ev_cani_miss,
  output logic          ev_encache,
  output logic          ev_pointer,
  output logic          ev_reloc
);

  localparam int unsigned LW = P + 2*C + 3;

  logic sys_rst_n;
  assign sys_rst_n = rst_n & ~load_en;

  // cache
  logic [3:0][C-1:0]    c_rd_addr;
  logic [3:0][LW-1:0]   c_rd_line;
  logic [1:0]           c_wr_en;
  logic [1:0][C-1:0]    c_wr_addr;
  line_mask_t [1:0]     c_wr_mask;
  logic [1:0][LW-1:0]   c_wr_line;

  // inventory
  logic [C-1:0] i_rd_addr, i_wr_addr;
  logic [M-1:0] i_rd_data, i_wr_data;
  logic         i_wr_en;

  // main memory
  logic [M-1:0] cmu_mm_addr, mm_addr;
  logic         cmu_mm_we, mm_we;
  logic [P-1:0] cmu_mm_wdata, mm_wdata, mm_rdata;

  // EU <-> CMU
  logic         miss_req, miss_done;
  miss_kind_e   miss_kind;
  logic [C-1:0] miss_caci, resume_caci;

  nmc_cache_store #(.P(P), .C(C), .NR(4), .NW(2)) u_cache (
    .clk    (clk),
    .rd_addr(c_rd_addr),
    .rd_line(c_rd_line),
    .wr_en  (c_wr_en),
    .wr_addr(c_wr_addr),
    .wr_mask(c_wr_mask),
    .wr_line(c_wr_line)
  );

  nmc_inventory #(.C(C), .M(M)) u_inv (
    .clk    (clk),
    .rd_addr(i_rd_addr),
    .rd_data(i_rd_data),
    .wr_en  (i_wr_en),
    .wr_addr(i_wr_addr),
    .wr_data(i_wr_data)
  );

  assign mm_addr    = load_en ? load_addr  : cmu_mm_addr;
  assign mm_we      = load_en ? load_we    : cmu_mm_we;
  assign mm_wdata   = load_en ? load_wdata : cmu_mm_wdata;
  assign load_rdata = mm_rdata;

  nmc_main_memory #(.P(P), .M(M)) u_mm (
    .clk  (clk),
    .addr (mm_addr),
    .we   (mm_we),
    .wdata(mm_wdata),
    .rdata(mm_rdata)
  );

  nmc_cmu #(.P(P), .C(C), .M(M)) u_cmu (
    .clk        (clk),
    .rst_n      (sys_rst_n),
    .ready      (ready),
    .miss_req   (miss_req),
    .miss_kind  (miss_kind),
    .miss_caci  (miss_caci),
    .miss_done  (miss_done),
    .resume_caci(resume_caci),
    .c_rd_addr  (c_rd_addr[3]),
    .c_rd_line  (c_rd_line[3]),
    .c_wr_en    (c_wr_en[0]),
    .c_wr_addr  (c_wr_addr[0]),
    .c_wr_mask  (c_wr_mask[0]),
    .c_wr_line  (c_wr_line[0]),
    .i_rd_addr  (i_rd_addr),
    .i_rd_data  (i_rd_data),
    .i_wr_en    (i_wr_en),
    .i_wr_addr  (i_wr_addr),
    .i_wr_data  (i_wr_data),
    .mm_addr    (cmu_mm_addr),
    .mm_we      (cmu_mm_we),
    .mm_wdata   (cmu_mm_wdata),
    .mm_rdata   (mm_rdata),
    .da         (da),
    .ev_encache (ev_encache),
    .ev_pointer (ev_pointer),
    .ev_reloc   (ev_reloc)
  );

  nmc_eu #(.P(P), .C(C)) u_eu (
    .clk         (clk),
    .rst_n       (sys_rst_n),
    .start       (ready),
    .c_rd_addr   (c_rd_addr[2:0]),
    .c_rd_line   (c_rd_line[2:0]),
    .c_wr_en     (c_wr_en[1]),
    .c_wr_addr   (c_wr_addr[1]),
    .c_wr_mask   (c_wr_mask[1]),
    .c_wr_line   (c_wr_line[1]),
    .miss_req    (miss_req),
    .miss_kind   (miss_kind),
    .miss_caci   (miss_caci),
    .miss_done   (miss_done),
    .resume_caci (resume_caci),
    .halted      (halted),
    .acc         (acc),
    .caci        (caci),
    .ev_retire   (ev_retire),
    .ev_cad_miss (ev_cad_miss),
    .ev_cani_miss(ev_cani_miss)
  );

  // The EU and the CMU never write the cache in the same cycle.
  a_one_writer: assert property (@(posedge clk) disable iff (!sys_rst_n)
    !(c_wr_en[0] && c_wr_en[1]));

  // The EU only calls the CMU once the cache is full.
  a_req_ready: assert property (@(posedge clk) disable iff (!sys_rst_n)
    miss_req |-> ready);

endmodule
