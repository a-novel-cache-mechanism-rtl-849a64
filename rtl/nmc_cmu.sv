// nmc_cmu: Cache Management Unit of the non-associative FIFO cache system.
//
// The execution unit (EU) runs from the cache alone. When one of the two
// pointers of the current instruction (CAD, the cache address of its datum,
// or CANI, that of the next instruction) fails the miss detection test, the
// EU hands the CMU the physical cache address of the current instruction
// (CACI) and which pointer failed. The CMU then:
//   1. reads the line and inventory entry at CACI and forms the main memory
//      address of the wanted item: MAD (the operand) for a CAD miss, or
//      MANI = MACI + 1 for a CANI miss;
//   2. reads main memory there and applies the pointer test (the inventory
//      entry at the word's C LSBs equals the address): a pointer means the
//      item is already encached and its (1+C)-bit logical address is taken
//      from the word; otherwise the word is the item and it is encached;
//   3. encaches with the published method's eight-step decache/encache procedure:
//      return the item in line DA to the main memory address held in the
//      inventory at DA, write the new item into line DA with both pointers
//      invalidated and the wraparound bit of DA, leave DA in the item's main
//      memory word, record the item's address in the inventory at DA;
//   4. writes the logical address into the failed field at CACI, increments
//      DA (cyclic FIFO) and signals done.
// If the line to be decached is the current instruction itself, the
// operand, MACI and the instruction were read out in step 1; after the
// wanted item is encached the instruction is encached again at the next DA,
// the link is written into that new copy, and the EU is told to resume
// there (resume_caci). The published description only asks that this case be allowed
// for; this way of handling it is this design's choice.
//
// After reset the CMU fills the cache from main memory words 0 .. 2^C-1
// (FIFO order, lines 0 .. 2^C-1), so that the cache is full and every
// inventory entry is a real address, which the pointer test needs. DA is
// then {1, 0...0}. This start-up fill, and the invalid-pointer encoding,
// are this design's choice: a pointer is invalidated by setting it to the
// line's own address with the wraparound bit inverted, i.e. to the logical
// address that was just decached, which always misses while the item is in
// the line.
//
// Timing (one main memory read takes one cycle): a miss resolved by a
// pointer takes 3 cycles (GETA, TEST, LINK), a miss that encaches takes 5
// (GETA, TEST, DC, EN, LINK), a relocation 2 more; the start-up fill takes
// 2 cycles per line. miss_done is a one-cycle pulse in the LINK cycle; the
// link is in the cache on the next edge.
module nmc_cmu
  import nmc_pkg::*;
#(
  parameter int unsigned P = P_DEFAULT,
  parameter int unsigned C = C_DEFAULT,
  parameter int unsigned M = M_DEFAULT
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               ready,
  // execution unit
  input  logic               miss_req,
  input  miss_kind_e         miss_kind,
  input  logic [C-1:0]       miss_caci,
  output logic               miss_done,
  output logic [C-1:0]       resume_caci,
  // cache: one read port, one write port
  output logic [C-1:0]       c_rd_addr,
  input  logic [P+2*C+2:0]   c_rd_line,
  output logic               c_wr_en,
  output logic [C-1:0]       c_wr_addr,
  output line_mask_t         c_wr_mask,
  output logic [P+2*C+2:0]   c_wr_line,
  // inventory
  output logic [C-1:0]       i_rd_addr,
  input  logic [M-1:0]       i_rd_data,
  output logic               i_wr_en,
  output logic [C-1:0]       i_wr_addr,
  output logic [M-1:0]       i_wr_data,
  // main memory
  output logic [M-1:0]       mm_addr,
  output logic               mm_we,
  output logic [P-1:0]       mm_wdata,
  input  logic [P-1:0]       mm_rdata,
  // observation
  output logic [C:0]         da,
  output logic               ev_encache,
  output logic               ev_pointer,
  output logic               ev_reloc
);

  typedef struct packed {
    logic         wrap;
    logic [C:0]   cani;
    logic [C:0]   cad;
    logic [P-1:0] item;
  } line_t;

  typedef enum logic [2:0] {
    S_INIT_RD, S_INIT_WR, S_IDLE, S_GETA, S_TEST, S_DC, S_EN, S_LINK
  } state_e;

  state_e       state;
  miss_kind_e   kind_q;
  logic [C-1:0] caci_q;
  logic [P-1:0] cur_item_q;   // the instruction at CACI
  logic [M-1:0] maci_q;       // its main memory address
  logic [M-1:0] target_q;     // MAD or MANI
  logic [P-1:0] enc_item_q;   // item being encached
  logic [M-1:0] enc_ma_q;     // its main memory address
  logic         reloc_q;      // current instruction must be encached again
  logic [C-1:0] link_line_q;
  logic [C:0]   link_ptr_q;
  logic [C-1:0] resume_q;

  logic         da_inc;
  line_t        rd_line;
  line_t        wr_line;
  logic [C:0]   inv_ptr;

  nmc_da_register #(.C(C)) u_da (
    .clk  (clk),
    .rst_n(rst_n),
    .inc  (da_inc),
    .da   (da)
  );

  // Pointer test on the word just read from main memory.
  logic [C-1:0] pc_ca;
  logic         pc_is_ptr;
  logic [C:0]   pc_ptr;

  nmc_pointer_check #(.P(P), .C(C), .M(M)) u_ptr (
    .ma        (target_q),
    .word      (mm_rdata),
    .ca        (pc_ca),
    .inv_entry (i_rd_data),
    .is_pointer(pc_is_ptr),
    .ptr       (pc_ptr)
  );

  assign rd_line     = line_t'(c_rd_line);
  assign c_wr_line   = wr_line;
  assign inv_ptr     = {~da[C], da[C-1:0]};
  assign ready       = (state != S_INIT_RD) && (state != S_INIT_WR);
  assign resume_caci = resume_q;

  // Operand (MAD) and MANI of the instruction at CACI, read in S_GETA.
  logic [M-1:0] mad_now, mani_now;
  assign mad_now  = rd_line.item[M-1:0];
  assign mani_now = i_rd_data + 1'b1;

  always_comb begin
    c_rd_addr  = caci_q;
    i_rd_addr  = caci_q;
    c_wr_en    = 1'b0;
    c_wr_addr  = da[C-1:0];
    c_wr_mask  = '0;
    wr_line    = '0;
    i_wr_en    = 1'b0;
    i_wr_addr  = da[C-1:0];
    i_wr_data  = enc_ma_q;
    mm_addr    = target_q;
    mm_we      = 1'b0;
    mm_wdata   = '0;
    da_inc     = 1'b0;
    miss_done  = 1'b0;
    ev_encache = 1'b0;
    ev_pointer = 1'b0;
    ev_reloc   = 1'b0;
    unique case (state)
      S_INIT_RD: mm_addr = M'(da[C-1:0]);
      S_INIT_WR: begin
        // Encache word da[C-1:0] into line da[C-1:0]; nothing to decache.
        mm_addr   = M'(da[C-1:0]);
        mm_we     = 1'b1;
        mm_wdata  = P'(da);
        c_wr_en   = 1'b1;
        c_wr_mask = '1;
        wr_line   = '{wrap: da[C], cani: inv_ptr, cad: inv_ptr, item: mm_rdata};
        i_wr_en   = 1'b1;
        i_wr_data = M'(da[C-1:0]);
        da_inc    = 1'b1;
      end
      S_IDLE: begin
        c_rd_addr = miss_caci;
        i_rd_addr = miss_caci;
      end
      S_GETA: begin
        mm_addr = (kind_q == MISS_CAD) ? mad_now : mani_now;
      end
      S_TEST: begin
        i_rd_addr = pc_ca;
        ev_pointer = pc_is_ptr;
      end
      S_DC: begin
        // Steps 1-2: return the item at DA to its main memory word.
        c_rd_addr = da[C-1:0];
        i_rd_addr = da[C-1:0];
        mm_addr   = i_rd_data;
        mm_we     = 1'b1;
        mm_wdata  = rd_line.item;
      end
      S_EN: begin
        // Steps 3-6: new item, pointers invalid, wrap bit, DA into main
        // memory, address into the inventory.
        c_wr_en    = 1'b1;
        c_wr_mask  = '1;
        wr_line    = '{wrap: da[C], cani: inv_ptr, cad: inv_ptr, item: enc_item_q};
        mm_addr    = enc_ma_q;
        mm_we      = 1'b1;
        mm_wdata   = P'(da);
        i_wr_en    = 1'b1;
        i_wr_data  = enc_ma_q;
        da_inc     = 1'b1;          // step 8
        ev_encache = 1'b1;
        ev_reloc   = reloc_q;
      end
      S_LINK: begin
        // Step 7: the logical address goes into the failed field.
        c_wr_en   = 1'b1;
        c_wr_addr = link_line_q;
        c_wr_mask      = '0;
        c_wr_mask.cad  = (kind_q == MISS_CAD);
        c_wr_mask.cani = (kind_q == MISS_CANI);
        wr_line   = '{wrap: 1'b0, cani: link_ptr_q, cad: link_ptr_q, item: '0};
        miss_done = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_INIT_RD;
      reloc_q  <= 1'b0;
      kind_q   <= MISS_CAD;
      caci_q   <= '0;
      resume_q <= '0;
    end else begin
      unique case (state)
        S_INIT_RD: state <= S_INIT_WR;
        S_INIT_WR: state <= (&da[C-1:0]) ? S_IDLE : S_INIT_RD;
        S_IDLE: if (miss_req) begin
          kind_q   <= miss_kind;
          caci_q   <= miss_caci;
          resume_q <= miss_caci;
          state    <= S_GETA;
        end
        S_GETA: begin
          cur_item_q <= rd_line.item;
          maci_q     <= i_rd_data;
          target_q   <= (kind_q == MISS_CAD) ? mad_now : mani_now;
          state      <= S_TEST;
        end
        S_TEST: begin
          link_line_q <= caci_q;
          if (pc_is_ptr) begin
            link_ptr_q <= pc_ptr;
            state      <= S_LINK;
          end else begin
            link_ptr_q <= da;
            enc_item_q <= mm_rdata;
            enc_ma_q   <= target_q;
            reloc_q    <= (da[C-1:0] == caci_q);
            state      <= S_DC;
          end
        end
        S_DC: state <= S_EN;
        S_EN: begin
          if (reloc_q) begin
            // The current instruction was just decached: encache it again
            // at the next DA and link the new copy instead.
            reloc_q     <= 1'b0;
            enc_item_q  <= cur_item_q;
            enc_ma_q    <= maci_q;
            link_line_q <= da[C-1:0] + 1'b1;
            resume_q    <= da[C-1:0] + 1'b1;
            state       <= S_DC;
          end else begin
            state <= S_LINK;
          end
        end
        S_LINK: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
