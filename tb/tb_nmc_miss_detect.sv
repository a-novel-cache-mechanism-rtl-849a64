// tb_nmc_miss_detect: exhaustive test of the two-bit miss detection test for
// a 4-bit logical pointer (C = 3): the line address must be the pointer's 3
// LSBs and a hit must be reported exactly when the pointer's MSB equals the
// line's wraparound bit.
module tb_nmc_miss_detect;
  localparam int unsigned C = 3;
  logic [C:0]   ptr;
  logic [C-1:0] line_addr;
  logic         line_wrap, hit;
  int checks = 0, failures = 0;

  nmc_miss_detect #(.C(C)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2**(C+1); p++) begin
      for (int w = 0; w < 2; w++) begin
        ptr = (C+1)'(p);
        line_wrap = w[0];
        #1;
        checks++;
        if (line_addr != p % 2**C || hit != ((p >> C) == w)) begin
          failures++;
          $display("FAIL ptr=%0d wrap=%0d addr=%0d hit=%0d", p, w, line_addr, hit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
