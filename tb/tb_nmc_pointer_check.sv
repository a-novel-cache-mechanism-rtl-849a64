// tb_nmc_pointer_check: random test of the pointer-versus-item decision. A
// word is a pointer exactly when the inventory entry found at its C LSBs
// equals the address it was read from; the logical pointer is its C+1 LSBs.
module tb_nmc_pointer_check;
  localparam int unsigned P = 16, C = 4, M = 12;
  logic [M-1:0] ma, inv_entry;
  logic [P-1:0] word;
  logic [C-1:0] ca;
  logic         is_pointer;
  logic [C:0]   ptr;
  int checks = 0, failures = 0;

  nmc_pointer_check #(.P(P), .C(C), .M(M)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      ma   = M'($urandom);
      word = P'($urandom);
      inv_entry = (i % 2 == 0) ? ma : M'($urandom);
      #1;
      checks++;
      if (ca != word[C-1:0] || ptr != word[C:0] || is_pointer != (inv_entry == ma)) begin
        failures++;
        $display("FAIL ma=%h word=%h inv=%h -> ca=%h ptr=%h is_ptr=%0d", ma, word, inv_entry,
                 ca, ptr, is_pointer);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
