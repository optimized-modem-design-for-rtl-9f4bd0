// tb_vm_4: exhaustive check of the 4x4-bit Vedic multiplier against the
// * operator, every pair of operands.
module tb_vm_4;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] q;

  vm_4 dut (.a(a), .b(b), .q(q));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 4); i++) begin
      for (int j = 0; j < (1 << 4); j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (q !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d * %0d = %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
