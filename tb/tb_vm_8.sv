// tb_vm_8: exhaustive check of the 8x8-bit Vedic multiplier against the
// * operator, every pair of operands.
module tb_vm_8;
  int checks = 0, failures = 0;
  logic [7:0] a, b;
  logic [15:0] q;

  vm_8 dut (.a(a), .b(b), .q(q));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 8); i++) begin
      for (int j = 0; j < (1 << 8); j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (q !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d * %0d = %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
