// tb_nmc_full: the whole system at its default sizes (16-bit words, 256-line
// cache, 4096-word main memory). Loads a random program without spatial
// locality whose code and data exceed the cache (so lines are decached and
// the FIFO wraps), runs it to HALT and compares accumulator, retired
// instruction count and the memory image seen through the cache with the
// flat-memory reference model. A second run repeats a loop that fits in
// the cache and checks that from its second pass on it runs without misses.
module tb_nmc_full;
  import nmc_pkg::*;
  import nmc_tb_pkg::*;

  localparam int unsigned P = P_DEFAULT, C = C_DEFAULT, M = M_DEFAULT;

  logic clk = 0, rst_n = 0;
  logic load_en = 1, load_we = 0;
  logic [M-1:0] load_addr = '0;
  logic [P-1:0] load_wdata = '0, load_rdata;
  logic ready, halted;
  logic [P-1:0] acc;
  logic [C-1:0] caci;
  logic [C:0] da;
  logic ev_retire, ev_cad_miss, ev_cani_miss, ev_encache, ev_pointer, ev_reloc;

  nmc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_retire = 0, n_miss = 0, n_enc = 0, n_ptr = 0, n_wrap = 0;
  logic da_msb_q = 0;
  int win_lo = -1, win_hi = -1, win_miss = 0;
  always @(posedge clk) begin
    if (n_retire >= win_lo && n_retire < win_hi && (ev_cad_miss || ev_cani_miss)) win_miss++;
    if (ev_retire) n_retire++;
    if (ev_cad_miss || ev_cani_miss) n_miss++;
    if (ev_encache) n_enc++;
    if (ev_pointer) n_ptr++;
    if (ready && da[C] != da_msb_q) n_wrap++;
    da_msb_q <= da[C];
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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
    int r0, m0, bad;
    bit ok;
    repeat (3) @(posedge clk);
    // random program larger than the cache
    gen_random_program(img, 40, 4, 64);
    ref_mem = img;
    ok = iss_run(ref_mem, ref_acc, ref_steps, 1000000);
    check(ok, "reference program halts");
    r0 = n_retire;
    load_and_run(img, 1000000);
    check(halted, "program halted");
    check(acc == ref_acc, $sformatf("acc %h expected %h", acc, ref_acc));
    check(n_retire - r0 == int'(ref_steps), $sformatf("retired %0d expected %0d",
                                                      n_retire - r0, ref_steps));
    bad = 0;
    for (int a = 0; a < 4096; a++) if (logical_word(a) !== ref_mem[a]) bad++;
    check(bad == 0, $sformatf("memory image: %0d words differ", bad));
    check(n_wrap > 1, "DA wrapped around");
    $display("random program: %0d instructions, %0d misses, %0d encaches, %0d pointer links",
             ref_steps, n_miss, n_enc, n_ptr);
    // fitting loop: misses only while warming up
    gen_small_loop(img, 50);
    ref_mem = img;
    void'(iss_run(ref_mem, ref_acc, ref_steps, 100000));
    r0 = n_retire; m0 = n_miss;
    win_lo = r0 + 4;                       // from the second pass ...
    win_hi = r0 + int'(ref_steps) - 1;     // ... to the final fall-through
    load_and_run(img, 100000);
    check(halted && acc == 0 && n_retire - r0 == int'(ref_steps), "fitting loop result");
    check(win_miss == 0 && n_miss > m0,
          $sformatf("fitting loop: %0d misses after the first pass", win_miss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
