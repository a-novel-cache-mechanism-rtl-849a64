// tb_nmc_inventory: random writes and asynchronous reads against a model;
// a write is visible on the read port after the clock edge that takes it.
module tb_nmc_inventory;
  localparam int unsigned C = 4, M = 12;
  logic clk = 0, wr_en = 0;
  logic [C-1:0] rd_addr = '0, wr_addr = '0;
  logic [M-1:0] rd_data, wr_data = '0;
  logic [M-1:0] model [2**C];
  int checks = 0, failures = 0;

  nmc_inventory #(.C(C), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < 2**C; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = C'(i); wr_data = M'($urandom); model[i] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      rd_addr = C'($urandom);
      wr_en   = $urandom_range(0, 1)[0];
      wr_addr = C'($urandom);
      wr_data = M'($urandom);
      #1;
      checks++;
      if (rd_data != model[rd_addr]) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", rd_addr, rd_data, model[rd_addr]);
      end
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
