// tb_nmc_da_register: the decache address must clear on reset, advance by
// one per inc, hold otherwise, and wrap from 2^(C+1)-1 to 0, so that its
// MSB toggles once every 2^C encaches.
module tb_nmc_da_register;
  localparam int unsigned C = 3;
  logic clk = 0, rst_n = 0, inc = 0;
  logic [C:0] da;
  int checks = 0, failures = 0;
  int expected = 0, msb_toggles = 0;

  nmc_da_register #(.C(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_msb;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (da != 0) begin failures++; $display("FAIL reset value %0d", da); end
    prev_msb = 0;
    for (int i = 0; i < 200; i++) begin
      inc = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (inc) expected = (expected + 1) % 2**(C+1);
      @(negedge clk);
      checks++;
      if (da != (C+1)'(expected)) begin
        failures++;
        $display("FAIL step %0d: da=%0d expected %0d", i, da, expected);
      end
      if (da[C] != prev_msb) msb_toggles++;
      prev_msb = da[C];
    end
    checks++;
    if (msb_toggles < 2) begin failures++; $display("FAIL no wraparound seen"); end
    @(negedge clk) rst_n = 0; inc = 1;
    @(negedge clk);
    checks++; if (da != 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
