// tb_vm_2: exhaustive check of the 2x2-bit Vedic multiplier against the
// * operator, every pair of operands.
module tb_vm_2;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] q;

  vm_2 dut (.a(a), .b(b), .q(q));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 2); i++) begin
      for (int j = 0; j < (1 << 2); j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (q !== 4'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d * %0d = %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
