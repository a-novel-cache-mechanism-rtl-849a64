// nmc_eu: Execution Unit of the non-associative FIFO cache system.
//
// The EU executes entirely out of the cache and never forms a main memory
// address. Each cache line holding an instruction carries two logical cache
// addresses filled in by the cache management unit (CMU): CAD, where the
// instruction's datum (or branch destination) is, and CANI, where the next
// sequential instruction is. The EU keeps only CACI, the physical cache
// address of the current instruction, and an accumulator.
//
// Each cycle in EXEC it reads three lines combinationally: the instruction
// at CACI, the line named by CAD and the line named by CANI, and applies the
// two-bit miss detection test to the last two. Only the pointers the
// instruction actually needs are tested: CAD for a datum access or a taken
// branch, CANI when control falls through. On a hit the instruction
// completes in that cycle (a store writes the accumulator into the item at
// CAD) and CACI moves to CAD (taken branch) or CANI. On a miss the EU raises
// miss_req with CACI and the failed field and waits for miss_done; it then
// resumes at resume_caci (normally the same CACI; another line if the CMU had
// to move the current instruction) and retries the access. A datum miss
// happens before execution; a next-instruction miss after it, so nothing is
// executed twice. NEXT is the state that only follows CANI.
//
// The store port has the cache's full line format, but the EU only ever
// writes the item field: the pointer and wraparound bits of c_wr_line and
// every bit of c_wr_mask other than item are constant by design.
//
// The instruction set (accumulator machine, opcodes in nmc_pkg) is this
// design's own; the published description fixes only the instruction format (opcode plus
// one main memory operand), the implied register and implied branch
// conditions. Execution starts at line 0, which holds main memory word 0
// after the CMU's start-up fill.
module nmc_eu
  import nmc_pkg::*;
#(
  parameter int unsigned P = P_DEFAULT,
  parameter int unsigned C = C_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,      // CMU has filled the cache
  // cache reads: [0] instruction at CACI, [1] line at CAD, [2] line at CANI
  output logic [2:0][C-1:0]       c_rd_addr,
  input  logic [2:0][P+2*C+2:0]   c_rd_line,
  // cache write: datum of a store
  output logic                    c_wr_en,
  output logic [C-1:0]            c_wr_addr,
  output line_mask_t              c_wr_mask,
  output logic [P+2*C+2:0]        c_wr_line,
  // cache management unit
  output logic                    miss_req,
  output miss_kind_e              miss_kind,
  output logic [C-1:0]            miss_caci,
  input  logic                    miss_done,
  input  logic [C-1:0]            resume_caci,
  // status
  output logic                    halted,
  output logic [P-1:0]            acc,
  output logic [C-1:0]            caci,
  output logic                    ev_retire,
  output logic                    ev_cad_miss,
  output logic                    ev_cani_miss
);

  typedef struct packed {
    logic         wrap;
    logic [C:0]   cani;
    logic [C:0]   cad;
    logic [P-1:0] item;
  } line_t;

  typedef enum logic [2:0] {E_START, E_EXEC, E_NEXT, E_MISS, E_HALT} state_e;

  state_e     state, ret_state;
  miss_kind_e kind_q;

  line_t   ci, dl, nl;
  opcode_e op;
  logic    cad_hit, cani_hit;
  logic [C-1:0] cad_line, cani_line;

  assign ci = line_t'(c_rd_line[0]);
  assign dl = line_t'(c_rd_line[1]);
  assign nl = line_t'(c_rd_line[2]);
  assign op = opcode_e'(ci.item[P-1 -: OPW]);

  nmc_miss_detect #(.C(C)) u_md_cad (
    .ptr(ci.cad), .line_addr(cad_line), .line_wrap(dl.wrap), .hit(cad_hit)
  );
  nmc_miss_detect #(.C(C)) u_md_cani (
    .ptr(ci.cani), .line_addr(cani_line), .line_wrap(nl.wrap), .hit(cani_hit)
  );

  assign c_rd_addr[0] = caci;
  assign c_rd_addr[1] = cad_line;
  assign c_rd_addr[2] = cani_line;

  assign miss_req  = (state == E_MISS);
  assign miss_kind = kind_q;
  assign miss_caci = caci;
  assign halted    = (state == E_HALT);

  // Decode of the instruction at CACI.
  logic need_cad, taken, is_branch;
  always_comb begin
    is_branch = op inside {OP_BZ, OP_BNZ, OP_JMP};
    unique case (op)
      OP_BZ:   taken = (acc == '0);
      OP_BNZ:  taken = (acc != '0);
      OP_JMP:  taken = 1'b1;
      default: taken = 1'b0;
    endcase
    need_cad = uses_datum(op) || (is_branch && taken);
  end

  logic exec_now;  // instruction completes this cycle
  assign exec_now  = (state == E_EXEC) && (op != OP_HALT) && (!need_cad || cad_hit);
  assign ev_retire = exec_now;

  always_comb begin
    c_wr_en   = exec_now && (op == OP_STORE);
    c_wr_addr = cad_line;
    c_wr_mask = '0;
    c_wr_mask.item = 1'b1;
    c_wr_line = '0;
    c_wr_line[P-1:0] = acc;
  end

  assign ev_cad_miss  = (state == E_EXEC) && (op != OP_HALT) && need_cad && !cad_hit;
  assign ev_cani_miss = ((state == E_EXEC) && exec_now && !(is_branch && taken) && !cani_hit)
                      || ((state == E_NEXT) && !cani_hit);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= E_START;
      ret_state <= E_EXEC;
      kind_q    <= MISS_CAD;
      caci      <= '0;
      acc       <= '0;
    end else begin
      unique case (state)
        E_START: if (start) state <= E_EXEC;
        E_EXEC: begin
          if (op == OP_HALT) begin
            state <= E_HALT;
          end else if (need_cad && !cad_hit) begin
            kind_q    <= MISS_CAD;
            ret_state <= E_EXEC;
            state     <= E_MISS;
          end else begin
            unique case (op)
              OP_LOAD: acc <= dl.item;
              OP_ADD:  acc <= acc + dl.item;
              OP_SUB:  acc <= acc - dl.item;
              default: ;
            endcase
            if (is_branch && taken) begin
              caci <= cad_line;
            end else if (cani_hit) begin
              caci <= cani_line;
            end else begin
              kind_q    <= MISS_CANI;
              ret_state <= E_NEXT;
              state     <= E_MISS;
            end
          end
        end
        E_NEXT: begin
          if (cani_hit) begin
            caci  <= cani_line;
            state <= E_EXEC;
          end else begin
            kind_q    <= MISS_CANI;
            ret_state <= E_NEXT;
            state     <= E_MISS;
          end
        end
        E_MISS: if (miss_done) begin
          caci  <= resume_caci;
          state <= ret_state;
        end
        E_HALT: ;
        default: state <= E_HALT;
      endcase
    end
  end

endmodule
