// tb_nmc_top: end-to-end test of the non-associative FIFO cache system.
//
// Runs with an 8-line cache (C = 3) so that decaching, wraparound and the
// relocation of the current instruction happen often:
//   1. several random programs without spatial locality (scattered code
//      chunks, scattered shared data, a counted outer loop) are loaded,
//      run to HALT and compared with the flat-memory reference model:
//      accumulator, retired-instruction count and every main memory word
//      as seen through the cache (a word holding a pointer, by the inventory
//      test, is read from its cache line);
//   2. a loop whose 7 items fit in the 8 lines is run; after its first
//      pass it must execute with no miss at all, one instruction per cycle.
// Each mechanism is counted (CAD miss, CANI miss, encache with decache,
// link through a main memory pointer, relocation of the current
// instruction, DA wraparound, store, taken branch) and must occur.
module tb_nmc_top;
  import nmc_pkg::*;
  import nmc_tb_pkg::*;

  localparam int unsigned P = 16, C = 3, M = 12;

  logic clk = 0, rst_n = 0;
  logic load_en = 1, load_we = 0;
  logic [M-1:0] load_addr = '0;
  logic [P-1:0] load_wdata = '0, load_rdata;
  logic ready, halted;
  logic [P-1:0] acc;
  logic [C-1:0] caci;
  logic [C:0] da;
  logic ev_retire, ev_cad_miss, ev_cani_miss, ev_encache, ev_pointer, ev_reloc;

  nmc_top #(.P(P), .C(C), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_retire, n_cad, n_cani, n_enc, n_ptr, n_reloc, n_wrap, n_store, n_taken;
  int cyc;
  logic da_msb_q;

  // Observation window for the fitting loop, in retired-instruction counts.
  int win_lo = -1, win_hi = -1, win_miss = 0, win_cyc = 0, win_ret = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (n_retire >= win_lo && n_retire < win_hi) begin
      win_cyc++;
      if (ev_retire) win_ret++;
      if (ev_cad_miss || ev_cani_miss) win_miss++;
    end
    if (ev_retire)    n_retire++;
    if (ev_cad_miss)  n_cad++;
    if (ev_cani_miss) n_cani++;
    if (ev_encache)   n_enc++;
    if (ev_pointer)   n_ptr++;
    if (ev_reloc)     n_reloc++;
    if (ready && da[C] != da_msb_q) n_wrap++;
    da_msb_q <= da[C];
    if (dut.c_wr_en[1]) n_store++;
    if (ev_retire && dut.u_eu.is_branch && dut.u_eu.taken) n_taken++;
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_and_run(ref word_t img[4096], input int unsigned max_cycles);
    load_en = 1;
    rst_n   = 1;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = M'(i); load_wdata = img[i];
    end
    @(negedge clk);
    load_we = 0;
    load_en = 0;
    for (int i = 0; i < int'(max_cycles) && !halted; i++) @(posedge clk);
  endtask

  // Main memory word as the program sees it.
  function automatic word_t logical_word(int unsigned ma);
    word_t w;
    logic [C-1:0] ca;
    w  = dut.u_mm.mem[ma];
    ca = w[C-1:0];
    if (dut.u_inv.mem[ca] == M'(ma)) return dut.u_cache.mem[ca].item;
    return w;
  endfunction

  word_t img [4096];
  word_t ref_mem [4096];

  initial begin
    word_t ref_acc;
    int unsigned ref_steps;
    int r0, c0, bad;
    n_retire = 0; n_cad = 0; n_cani = 0; n_enc = 0; n_ptr = 0; n_reloc = 0;
    n_wrap = 0; n_store = 0; n_taken = 0; cyc = 0; da_msb_q = 0;
    repeat (3) @(posedge clk);

    // 1. random programs
    for (int t = 0; t < 6; t++) begin
      bit ok;
      gen_random_program(img, 3 + t, 3 + t % 3, 4 + 2 * t);
      ref_mem = img;
      ok = iss_run(ref_mem, ref_acc, ref_steps, 100000);
      check(ok, "reference program halts");
      r0 = n_retire;
      load_and_run(img, 200000);
      check(halted, $sformatf("program %0d halted", t));
      check(acc == ref_acc, $sformatf("program %0d acc %h expected %h", t, acc, ref_acc));
      check(n_retire - r0 == int'(ref_steps),
            $sformatf("program %0d retired %0d expected %0d", t, n_retire - r0, ref_steps));
      bad = 0;
      for (int a = 0; a < 4096; a++) if (logical_word(a) !== ref_mem[a]) begin
        if (bad < 5) $display("  mem[%h] = %h expected %h", a, logical_word(a), ref_mem[a]);
        bad++;
      end
      check(bad == 0, $sformatf("program %0d memory image (%0d words differ)", t, bad));
    end

    // 2. a loop that fits: no misses after the first passes, 1 instr/cycle
    begin
      int unsigned iters = 30;
      gen_small_loop(img, iters);
      ref_mem = img;
      void'(iss_run(ref_mem, ref_acc, ref_steps, 100000));
      r0 = n_retire;
      load_en = 1;
      rst_n   = 1;
      for (int i = 0; i < 4096; i++) begin
        @(negedge clk);
        load_we = 1; load_addr = M'(i); load_wdata = img[i];
      end
      @(negedge clk);
      load_we = 0;
      load_en = 0;
      // from the 2nd pass up to, not including, the last BNZ (which falls
      // through and misses on CANI)
      win_lo = r0 + 4;
      win_hi = r0 + int'(ref_steps) - 1;
      while (n_retire < win_hi) @(posedge clk);
      check(win_miss == 0, $sformatf("fitting loop: %0d misses after the first pass", win_miss));
      check(win_ret == win_hi - win_lo && win_cyc == win_ret,
            $sformatf("fitting loop: %0d cycles for %0d instructions", win_cyc, win_ret));
      for (int i = 0; i < 100 && !halted; i++) @(posedge clk);
      check(halted && acc == 0 && n_retire - r0 == int'(ref_steps), "fitting loop result");
      check(logical_word(12'h900) == 0, "fitting loop counter in memory");
    end

    $display("mechanisms: cad_miss=%0d cani_miss=%0d encache=%0d pointer_link=%0d reloc=%0d wrap=%0d store=%0d taken=%0d retired=%0d",
             n_cad, n_cani, n_enc, n_ptr, n_reloc, n_wrap, n_store, n_taken, n_retire);
    check(n_cad   > 0, "CAD miss happened");
    check(n_cani  > 0, "CANI miss happened");
    check(n_enc   > 0, "encache happened");
    check(n_ptr   > 0, "link through main memory pointer happened");
    check(n_reloc > 0, "relocation of the current instruction happened");
    check(n_wrap  > 0, "DA wraparound happened");
    check(n_store > 0, "store happened");
    check(n_taken > 0, "taken branch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
