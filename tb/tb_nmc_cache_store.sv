// tb_nmc_cache_store: random masked writes on two write ports and reads on
// four asynchronous read ports, against a model of the line fields
// {wrap, cani, cad, item}; on a same-line write the higher port wins.
module tb_nmc_cache_store;
  import nmc_pkg::*;
  localparam int unsigned P = 16, C = 3, NR = 4, NW = 2, LW = P + 2*C + 3;
  logic clk = 0;
  logic [NR-1:0][C-1:0]  rd_addr;
  logic [NR-1:0][LW-1:0] rd_line;
  logic [NW-1:0]         wr_en;
  logic [NW-1:0][C-1:0]  wr_addr;
  line_mask_t [NW-1:0]   wr_mask;
  logic [NW-1:0][LW-1:0] wr_line;
  logic [LW-1:0] model [2**C];
  int checks = 0, failures = 0;

  nmc_cache_store #(.P(P), .C(C), .NR(NR), .NW(NW)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [LW-1:0] merge(logic [LW-1:0] old, logic [LW-1:0] nw, line_mask_t m);
    logic [LW-1:0] r = old;
    if (m.item) r[P-1:0]           = nw[P-1:0];
    if (m.cad)  r[P+C:P]           = nw[P+C:P];
    if (m.cani) r[P+2*C+1:P+C+1]   = nw[P+2*C+1:P+C+1];
    if (m.wrap) r[LW-1]            = nw[LW-1];
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = '0; rd_addr = '0; wr_addr = '0; wr_mask = '0; wr_line = '0;
    for (int i = 0; i < 2**C; i++) begin
      @(negedge clk);
      wr_en = 2'b01; wr_addr[0] = C'(i); wr_mask[0] = '1;
      wr_line[0] = {$urandom, $urandom};
      model[i] = wr_line[0];
    end
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      for (int r = 0; r < int'(NR); r++) rd_addr[r] = C'($urandom);
      for (int w = 0; w < int'(NW); w++) begin
        wr_en[w]   = $urandom_range(0, 1)[0];
        wr_addr[w] = C'($urandom);
        wr_mask[w] = line_mask_t'($urandom);
        wr_line[w] = {$urandom, $urandom};
      end
      #1;
      for (int r = 0; r < int'(NR); r++) begin
        checks++;
        if (rd_line[r] != model[rd_addr[r]]) begin
          failures++;
          $display("FAIL port %0d line %0d: %h expected %h", r, rd_addr[r], rd_line[r],
                   model[rd_addr[r]]);
        end
      end
      @(posedge clk);
      for (int w = 0; w < int'(NW); w++)
        if (wr_en[w]) model[wr_addr[w]] = merge(model[wr_addr[w]], wr_line[w], wr_mask[w]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
