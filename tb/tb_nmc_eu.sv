// tb_nmc_eu: the execution unit against a real cache store, with the
// testbench playing the cache management unit.
//   Phase 1: a linked straight-line program (LOAD, ADD, STORE, BNZ) whose
//   pointers are all valid runs one instruction per cycle; the taken BNZ
//   has an invalid CAD and must raise a CAD miss at its CACI without side
//   effects; after the link is written the branch completes and HALT stops
//   the EU.
//   Phase 2: a NOP with an invalid CANI executes once, raises a CANI miss;
//   the "CMU" answers with a relocated copy of the NOP (resume_caci), and
//   the EU must follow the new copy's CANI without executing the NOP again.
//   Phase 3: a LOAD with an invalid CAD must miss before changing acc.
//   Phase 4: a branch that is not taken must not test its invalid CAD.
module tb_nmc_eu;
  import nmc_pkg::*;
  localparam int unsigned P = 16, C = 3, LW = P + 2*C + 3;

  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0][C-1:0]  c_rd_addr;
  logic [2:0][LW-1:0] c_rd_line;
  logic [1:0]         wr_en;
  logic [1:0][C-1:0]  wr_addr;
  line_mask_t [1:0]   wr_mask;
  logic [1:0][LW-1:0] wr_line;
  // port 0: EU, port 1: testbench
  logic               eu_wr_en, tb_wr_en;
  logic [C-1:0]       eu_wr_addr, tb_wr_addr;
  line_mask_t         eu_wr_mask, tb_wr_mask;
  logic [LW-1:0]      eu_wr_line, tb_wr_line;
  assign wr_en   = {tb_wr_en, eu_wr_en};
  assign wr_addr = {tb_wr_addr, eu_wr_addr};
  assign wr_mask = {tb_wr_mask, eu_wr_mask};
  assign wr_line = {tb_wr_line, eu_wr_line};
  logic               miss_req, miss_done = 0;
  miss_kind_e         miss_kind;
  logic [C-1:0]       miss_caci, resume_caci = '0;
  logic               halted, ev_retire, ev_cad_miss, ev_cani_miss;
  logic [P-1:0]       acc;
  logic [C-1:0]       caci;

  nmc_cache_store #(.P(P), .C(C), .NR(3), .NW(2)) u_cache (
    .clk(clk), .rd_addr(c_rd_addr), .rd_line(c_rd_line),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_mask(wr_mask), .wr_line(wr_line)
  );

  nmc_eu #(.P(P), .C(C)) dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .c_rd_addr(c_rd_addr), .c_rd_line(c_rd_line),
    .c_wr_en(eu_wr_en), .c_wr_addr(eu_wr_addr), .c_wr_mask(eu_wr_mask), .c_wr_line(eu_wr_line),
    .miss_req(miss_req), .miss_kind(miss_kind), .miss_caci(miss_caci),
    .miss_done(miss_done), .resume_caci(resume_caci),
    .halted(halted), .acc(acc), .caci(caci),
    .ev_retire(ev_retire), .ev_cad_miss(ev_cad_miss), .ev_cani_miss(ev_cani_miss)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, retired = 0, cycles = 0;
  int retire_cyc [8];
  always @(posedge clk) begin
    cycles++;
    if (ev_retire) begin
      if (retired < 8) retire_cyc[retired] = cycles;
      retired++;
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Write a whole line (or one field) through the testbench's write port.
  task automatic wline(int idx, opcode_e op, int mad, logic [C:0] cad, logic [C:0] cani,
                       logic wrap = 1'b0);
    @(negedge clk);
    tb_wr_en = 1; tb_wr_addr = C'(idx); tb_wr_mask = '1;
    tb_wr_line = {wrap, cani, cad, op, 12'(mad)};
    @(negedge clk);
    tb_wr_en = 0;
  endtask
  task automatic wdata(int idx, logic [P-1:0] v);
    @(negedge clk);
    tb_wr_en = 1; tb_wr_addr = C'(idx); tb_wr_mask = '1;
    tb_wr_line = {1'b0, (C+1)'(0), (C+1)'(0), v};
    @(negedge clk);
    tb_wr_en = 0;
  endtask
  task automatic wfield(int idx, bit cani_field, logic [C:0] ptr);
    @(negedge clk);
    tb_wr_en = 1; tb_wr_addr = C'(idx);
    tb_wr_mask = '0;
    if (cani_field) tb_wr_mask.cani = 1'b1; else tb_wr_mask.cad = 1'b1;
    tb_wr_line = {1'b0, ptr, ptr, P'(0)};
    @(negedge clk);
    tb_wr_en = 0;
  endtask
  task automatic answer(logic [C-1:0] resume);
    @(negedge clk);
    miss_done = 1; resume_caci = resume;
    @(negedge clk);
    miss_done = 0;
  endtask
  task automatic restart();
    @(negedge clk);
    rst_n = 0; start = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  localparam logic [C:0] BAD = {1'b1, C'(0)};  // MSB 1: misses on wrap-0 lines

  initial begin
    int c0, r0;
    tb_wr_en = 0; tb_wr_addr = '0; tb_wr_mask = '0; tb_wr_line = '0;
    // ---------- phase 1
    wline(0, OP_LOAD,  12'h100, 4'd5, 4'd1);
    wline(1, OP_ADD,   12'h101, 4'd6, 4'd2);
    wline(2, OP_STORE, 12'h102, 4'd7, 4'd3);
    wline(3, OP_BNZ,   12'h000, BAD | 4'd0, BAD | 4'd3);
    wline(4, OP_HALT,  0, BAD, BAD);
    wdata(5, 16'd10);
    wdata(6, 16'd3);
    wdata(7, 16'd0);
    restart();
    check(!miss_req && !halted, "idle before start");
    @(negedge clk) start = 1;
    c0 = cycles; r0 = retired;
    while (!miss_req && cycles - c0 < 50) @(posedge clk);
    @(negedge clk);
    // LOAD, ADD, STORE retire in consecutive cycles
    check(retire_cyc[r0 + 2] - retire_cyc[r0] == 2,
          $sformatf("three hits in %0d cycles", retire_cyc[r0 + 2] - retire_cyc[r0] + 1));
    check(retired - r0 == 3, "three instructions retired");
    check(miss_kind == MISS_CAD && miss_caci == 3, "taken branch misses on CAD at CACI 3");
    check(acc == 16'd13, $sformatf("acc = %0d", acc));
    check(u_cache.mem[7].item == 16'd13, "store wrote the datum line");
    repeat (3) @(negedge clk);
    check(miss_req && retired - r0 == 3, "EU waits for the CMU");
    wfield(3, 0, 4'd4);
    answer(3'd3);
    repeat (3) @(negedge clk);
    check(halted && caci == 4, "branch followed CAD to the HALT line");
    check(retired - r0 == 4, "branch retired once");
    // ---------- phase 2
    wline(0, OP_NOP,  0, BAD, BAD);
    wline(1, OP_HALT, 0, BAD, BAD);
    restart();
    @(negedge clk) start = 1;
    r0 = retired;
    while (!miss_req) @(posedge clk);
    @(negedge clk);
    check(miss_kind == MISS_CANI && miss_caci == 0, "NOP misses on CANI");
    check(retired - r0 == 1, "NOP retired before the CANI miss");
    wline(2, OP_NOP, 0, BAD, 4'd1);  // relocated copy, linked to line 1
    answer(3'd2);
    repeat (3) @(negedge clk);
    check(halted && caci == 1 && retired - r0 == 1, "resumed at relocated copy, NOP not repeated");
    // ---------- phase 3
    wline(0, OP_LOAD, 12'h055, BAD | 4'd6, 4'd1);
    restart();
    @(negedge clk) start = 1;
    r0 = retired;
    while (!miss_req) @(posedge clk);
    @(negedge clk);
    check(miss_kind == MISS_CAD && miss_caci == 0 && acc == 0 && retired == r0,
          "LOAD misses on CAD before executing");
    wfield(0, 0, 4'd6);
    answer(3'd0);
    repeat (3) @(negedge clk);
    check(halted && acc == 16'd3 && retired - r0 == 1, "LOAD completed after the link");
    // ---------- phase 4: a branch not taken ignores its (invalid) CAD
    wline(1, OP_BZ,   12'h077, BAD | 4'd5, 4'd2);
    wline(2, OP_HALT, 0, BAD, BAD);
    restart();
    @(negedge clk) start = 1;
    r0 = retired;
    for (int i = 0; i < 10 && !halted; i++) begin
      @(negedge clk);
      check(!miss_req, "no miss for a branch that is not taken");
    end
    check(halted && caci == 2 && retired - r0 == 2 && acc == 16'd3,
          "not-taken branch fell through to CANI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
