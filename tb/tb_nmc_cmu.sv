// tb_nmc_cmu: the cache management unit with a real cache store, inventory
// and main memory (8-line cache), the testbench playing the execution unit.
// Expected contents are worked out by hand from the decache/encache rules:
//   - start-up fill: line i <- word i, wrap 0, both pointers invalid
//     ({1, i}), inventory i, word i <- pointer i, DA = 8, in 16 cycles;
//   - CAD miss on an item still in main memory (encache at DA, decache of
//     the old line back to its word, link, DA + 1) in 5 cycles;
//   - CAD miss on an item already encached (found through the pointer left
//     in main memory, no encache) in 3 cycles;
//   - CANI miss: MANI = MACI + 1 found as a pointer, and as an item;
//   - CAD miss with DA on the current instruction: the item is encached,
//     the instruction is encached again after it, the link goes into the
//     new copy and resume_caci names it, in 7 cycles;
//   - the worked example of an instruction whose datum and successor are
//     encached right after it: CAD = CACI + 1, CANI = CACI + 2.
module tb_nmc_cmu;
  import nmc_pkg::*;
  localparam int unsigned P = 16, C = 3, M = 12, LW = P + 2*C + 3;

  logic clk = 0, rst_n = 0, ready;
  logic miss_req = 0, miss_done;
  miss_kind_e miss_kind = MISS_CAD;
  logic [C-1:0] miss_caci = '0, resume_caci;
  logic [C-1:0] c_rd_addr, c_wr_addr, i_rd_addr, i_wr_addr;
  logic [LW-1:0] c_rd_line, c_wr_line;
  logic c_wr_en, i_wr_en;
  line_mask_t c_wr_mask;
  logic [M-1:0] i_rd_data, i_wr_data;
  logic [M-1:0] cmu_mm_addr, mm_addr;
  logic cmu_mm_we, mm_we;
  logic [P-1:0] cmu_mm_wdata, mm_wdata, mm_rdata;
  logic [C:0] da;
  logic ev_encache, ev_pointer, ev_reloc;

  logic load_en = 1, load_we = 0;
  logic [M-1:0] load_addr = '0;
  logic [P-1:0] load_wdata = '0;

  assign mm_addr  = load_en ? load_addr  : cmu_mm_addr;
  assign mm_we    = load_en ? load_we    : cmu_mm_we;
  assign mm_wdata = load_en ? load_wdata : cmu_mm_wdata;

  nmc_cache_store #(.P(P), .C(C), .NR(1), .NW(1)) u_cache (
    .clk(clk), .rd_addr(c_rd_addr), .rd_line(c_rd_line),
    .wr_en(c_wr_en), .wr_addr(c_wr_addr), .wr_mask(c_wr_mask), .wr_line(c_wr_line)
  );
  nmc_inventory #(.C(C), .M(M)) u_inv (
    .clk(clk), .rd_addr(i_rd_addr), .rd_data(i_rd_data),
    .wr_en(i_wr_en), .wr_addr(i_wr_addr), .wr_data(i_wr_data)
  );
  nmc_main_memory #(.P(P), .M(M)) u_mm (
    .clk(clk), .addr(mm_addr), .we(mm_we), .wdata(mm_wdata), .rdata(mm_rdata)
  );
  nmc_cmu #(.P(P), .C(C), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .ready(ready),
    .miss_req(miss_req), .miss_kind(miss_kind), .miss_caci(miss_caci),
    .miss_done(miss_done), .resume_caci(resume_caci),
    .c_rd_addr(c_rd_addr), .c_rd_line(c_rd_line),
    .c_wr_en(c_wr_en), .c_wr_addr(c_wr_addr), .c_wr_mask(c_wr_mask), .c_wr_line(c_wr_line),
    .i_rd_addr(i_rd_addr), .i_rd_data(i_rd_data),
    .i_wr_en(i_wr_en), .i_wr_addr(i_wr_addr), .i_wr_data(i_wr_data),
    .mm_addr(cmu_mm_addr), .mm_we(cmu_mm_we), .mm_wdata(cmu_mm_wdata), .mm_rdata(mm_rdata),
    .da(da), .ev_encache(ev_encache), .ev_pointer(ev_pointer), .ev_reloc(ev_reloc)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0, n_enc = 0, n_ptr = 0, n_reloc = 0;
  always @(posedge clk) begin
    cycles++;
    if (ev_encache) n_enc++;
    if (ev_pointer) n_ptr++;
    if (ev_reloc)   n_reloc++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [P-1:0] ins(opcode_e op, int mad);
    return {op, 12'(mad)};
  endfunction

  // Raise a miss and return the number of cycles until miss_done.
  task automatic miss(miss_kind_e k, int caci_v, output int lat);
    int c0;
    @(negedge clk);
    miss_req = 1; miss_kind = k; miss_caci = C'(caci_v);
    c0 = cycles;
    @(posedge clk);
    while (!miss_done) @(posedge clk);
    lat = cycles - c0;
    @(negedge clk);
    miss_req = 0;
    @(negedge clk);
  endtask

  function automatic bit line_is(int i, logic [P-1:0] item, logic wrap);
    return u_cache.mem[i].item == item && u_cache.mem[i].wrap == wrap;
  endfunction

  logic [P-1:0] w [16];

  initial begin
    int lat, c0;
    w[0] = ins(OP_LOAD, 12'h100);  w[1] = ins(OP_ADD, 12'h100);
    w[2] = ins(OP_LOAD, 12'h300);  w[3] = ins(OP_LOAD, 12'h400);
    w[4] = ins(OP_LOAD, 12'h100);  w[5] = ins(OP_NOP, 0);
    w[6] = ins(OP_NOP, 0);         w[7] = ins(OP_NOP, 0);
    w[8] = ins(OP_HALT, 0);
    for (int i = 0; i < 9; i++) begin
      @(negedge clk); load_we = 1; load_addr = M'(i); load_wdata = w[i];
    end
    @(negedge clk); load_we = 1; load_addr = 12'h100; load_wdata = 16'h1234;
    @(negedge clk); load_we = 1; load_addr = 12'h300; load_wdata = 16'hBEEF;
    @(negedge clk); load_we = 1; load_addr = 12'h400; load_wdata = 16'h0042;
    @(negedge clk); load_we = 0; load_en = 0; rst_n = 1;
    c0 = cycles;
    // ---- start-up fill
    @(posedge clk);
    while (!ready) @(posedge clk);
    check(cycles - c0 == 16, $sformatf("fill took %0d cycles", cycles - c0));
    @(negedge clk);
    check(da == 4'b1000, "DA after fill");
    for (int i = 0; i < 8; i++) begin
      check(line_is(i, w[i], 1'b0), $sformatf("line %0d item/wrap", i));
      check(u_cache.mem[i].cad == {1'b1, 3'(i)} && u_cache.mem[i].cani == {1'b1, 3'(i)},
            $sformatf("line %0d pointers invalid", i));
      check(u_inv.mem[i] == M'(i), $sformatf("inventory %0d", i));
      check(u_mm.mem[i] == P'(i), $sformatf("word %0d holds pointer", i));
    end
    // ---- CAD miss, datum in main memory (DA = 8, line 0)
    miss(MISS_CAD, 1, lat);
    check(lat == 5, $sformatf("encaching miss took %0d cycles", lat));
    check(u_mm.mem[0] == w[0], "line 0 item returned to word 0");
    check(line_is(0, 16'h1234, 1'b1), "datum in line 0 with wrap 1");
    check(u_cache.mem[0].cad == 4'b0000 && u_cache.mem[0].cani == 4'b0000, "new line pointers invalid");
    check(u_inv.mem[0] == 12'h100, "inventory 0 = 0x100");
    check(u_mm.mem[12'h100] == 16'd8, "word 0x100 holds DA = 8");
    check(u_cache.mem[1].cad == 4'd8, "CAD at line 1 = 8");
    check(da == 4'd9 && n_enc == 1, "DA advanced, one encache");
    // ---- CAD miss, datum already encached
    miss(MISS_CAD, 4, lat);
    check(lat == 3, $sformatf("pointer miss took %0d cycles", lat));
    check(u_cache.mem[4].cad == 4'd8, "CAD at line 4 = 8 through main memory pointer");
    check(da == 4'd9 && n_enc == 1 && n_ptr == 1, "no encache for pointer miss");
    // ---- CANI miss, next instruction encached
    miss(MISS_CANI, 4, lat);
    check(u_cache.mem[4].cani == 4'd5, "CANI at line 4 = 5");
    check(n_ptr == 2 && da == 4'd9, "next instruction found by pointer");
    // ---- CANI miss, next instruction in main memory (MANI = 8)
    miss(MISS_CANI, 7, lat);
    check(u_mm.mem[1] == w[1], "line 1 item returned to word 1");
    check(line_is(1, w[8], 1'b1) && u_inv.mem[1] == 12'd8 && u_mm.mem[8] == 16'd9,
          "word 8 encached in line 1");
    check(u_cache.mem[7].cani == 4'd9, "CANI at line 7 = 9");
    check(da == 4'd10, "DA = 10");
    // ---- CAD miss with DA on the current instruction (line 2)
    miss(MISS_CAD, 2, lat);
    check(lat == 7, $sformatf("relocating miss took %0d cycles", lat));
    check(n_reloc == 1, "relocation reported");
    check(line_is(2, 16'hBEEF, 1'b1) && u_inv.mem[2] == 12'h300 && u_mm.mem[12'h300] == 16'd10,
          "datum encached in line 2");
    check(u_mm.mem[3] == w[3], "line 3 item returned to word 3");
    check(line_is(3, w[2], 1'b1) && u_inv.mem[3] == 12'd2 && u_mm.mem[2] == 16'd11,
          "current instruction encached again in line 3");
    check(u_cache.mem[3].cad == 4'd10, "CAD of the new copy = 10");
    check(resume_caci == 3'd3, "resume at line 3");
    check(da == 4'd12, "DA = 12");
    // ---- worked example: instruction, its datum and its successor encached
    // in succession give CAD = CACI + 1 and CANI = CACI + 2
    miss(MISS_CANI, 3, lat);        // MANI = 3: word 3 encached at logical 12
    check(line_is(4, w[3], 1'b1) && u_cache.mem[3].cani == 4'd12, "word 3 at CACI = 12");
    check(u_mm.mem[4] == w[4], "line 4 item returned to word 4");
    miss(MISS_CAD, 4, lat);         // its datum
    check(u_cache.mem[4].cad == 4'd13 && line_is(5, 16'h0042, 1'b1), "CAD = CACI + 1");
    miss(MISS_CANI, 4, lat);        // its successor, word 4
    check(u_cache.mem[4].cani == 4'd14 && line_is(6, w[4], 1'b1), "CANI = CACI + 2");
    check(da == 4'd15 && n_enc == 7, "three more encaches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
