// nmc_tb_pkg: testbench helpers for the non-associative FIFO cache system.
//
// - iss_run: a flat-memory reference model of the accumulator instruction
//   set (no cache at all), used to work out the expected accumulator,
//   memory contents and retired-instruction count of a program.
// - gen_random_program: builds a terminating program with no spatial
//   locality: code chunks scattered over the lower half of main memory and
//   joined by jumps, data scattered over the upper half, a loop counter
//   decremented around the whole body, random forward branches and several
//   instructions sharing each datum.
// - gen_small_loop: a loop whose code and data fit in an 8-line cache.
// Words are 16 bits: 4-bit opcode, 12-bit main memory address.
package nmc_tb_pkg;
  import nmc_pkg::*;

  typedef logic [15:0] word_t;

  function automatic word_t enc(opcode_e op, int unsigned mad);
    return {op, 12'(mad)};
  endfunction

  // Returns 1 if the program halted within max_steps.
  function automatic bit iss_run(ref word_t mem[4096], output word_t acc,
                                 output int unsigned steps, input int unsigned max_steps);
    int unsigned pc = 0;
    acc = '0;
    steps = 0;
    while (steps < max_steps) begin
      opcode_e op;
      logic [11:0] mad;
      op  = opcode_e'(mem[pc][15:12]);
      mad = mem[pc][11:0];
      if (op == OP_HALT) return 1'b1;
      steps++;
      unique case (op)
        OP_LOAD:  begin acc = mem[mad];       pc = (pc + 1) % 4096; end
        OP_ADD:   begin acc = acc + mem[mad]; pc = (pc + 1) % 4096; end
        OP_SUB:   begin acc = acc - mem[mad]; pc = (pc + 1) % 4096; end
        OP_STORE: begin mem[mad] = acc;       pc = (pc + 1) % 4096; end
        OP_BZ:    pc = (acc == 0) ? int'(mad) : (pc + 1) % 4096;
        OP_BNZ:   pc = (acc != 0) ? int'(mad) : (pc + 1) % 4096;
        OP_JMP:   pc = mad;
        default:  pc = (pc + 1) % 4096;
      endcase
    end
    return 1'b0;
  endfunction

  // nchunks code chunks of up to 10 random instructions each; iters loop
  // passes; npool distinct data words.
  function automatic void gen_random_program(ref word_t mem[4096], input int unsigned nchunks,
                                             input int unsigned iters, input int unsigned npool);
    int unsigned pool [];
    int unsigned base [];
    int unsigned cnt_a = 12'h7F0, one_a = 12'h7F8;
    pool = new[npool];
    base = new[nchunks];
    foreach (mem[i]) mem[i] = 16'(16'hF000 | $urandom_range(0, 16'h0FFF)); // junk: opcode F = no-op
    for (int i = 0; i < int'(npool); i++) begin
      pool[i] = 12'h800 + i * (2048 / npool) + $urandom_range(0, (2048 / npool) - 1);
      mem[pool[i]] = 16'($urandom);
    end
    for (int k = 0; k < int'(nchunks); k++)
      base[k] = (k == 0) ? 0 : k * (1920 / nchunks) + $urandom_range(0, (1920 / nchunks) - 24);
    mem[cnt_a] = 16'(iters);
    mem[one_a] = 16'd1;
    for (int k = 0; k < int'(nchunks); k++) begin
      int unsigned a = base[k];
      int unsigned n = $urandom_range(3, 10);
      for (int j = 0; j < int'(n); j++) begin
        int unsigned r = $urandom_range(0, 9);
        int unsigned d = pool[$urandom_range(0, npool - 1)];
        unique case (r)
          0, 1:    mem[a] = enc(OP_LOAD, d);
          2, 3:    mem[a] = enc(OP_ADD, d);
          4:       mem[a] = enc(OP_SUB, d);
          5, 6:    mem[a] = enc(OP_STORE, d);
          7:       mem[a] = enc(OP_NOP, 0);
          8:       mem[a] = enc(OP_BZ, a + 2);
          default: mem[a] = enc(OP_BNZ, a + 2);
        endcase
        a++;
      end
      mem[a] = enc(OP_ADD, pool[0]);  // target of a branch from the last slot
      a++;
      if (k + 1 < int'(nchunks)) begin
        mem[a] = enc(OP_JMP, base[k + 1]);
      end else begin
        mem[a]     = enc(OP_LOAD, cnt_a);
        mem[a + 1] = enc(OP_SUB, one_a);
        mem[a + 2] = enc(OP_STORE, cnt_a);
        mem[a + 3] = enc(OP_BNZ, 0);
        mem[a + 4] = enc(OP_HALT, 0);
      end
    end
  endfunction

  // Countdown loop of 4 instructions on 2 data words: 7 items in all.
  function automatic void gen_small_loop(ref word_t mem[4096], input int unsigned iters);
    foreach (mem[i]) mem[i] = '0;
    mem[0] = enc(OP_LOAD, 12'h900);
    mem[1] = enc(OP_SUB, 12'hA01);
    mem[2] = enc(OP_STORE, 12'h900);
    mem[3] = enc(OP_BNZ, 0);
    mem[4] = enc(OP_HALT, 0);
    mem[12'h900] = 16'(iters);
    mem[12'hA01] = 16'd1;
  endfunction

endpackage
