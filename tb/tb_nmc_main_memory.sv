// tb_nmc_main_memory: random reads and writes against a model; read data
// appears one cycle after the address (old data on a same-cycle write).
module tb_nmc_main_memory;
  localparam int unsigned P = 16, M = 8;
  logic clk = 0, we = 0;
  logic [M-1:0] addr = '0;
  logic [P-1:0] wdata = '0, rdata;
  logic [P-1:0] model [2**M];
  int checks = 0, failures = 0;

  nmc_main_memory #(.P(P), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [P-1:0] expect_q;
    for (int i = 0; i < 2**M; i++) begin
      @(negedge clk);
      we = 1; addr = M'(i); wdata = P'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1)[0]; addr = M'($urandom); wdata = P'($urandom);
      expect_q = model[addr];
      @(posedge clk);
      if (we) model[addr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata != expect_q) begin
        failures++;
        $display("FAIL read %h: %h expected %h", addr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
