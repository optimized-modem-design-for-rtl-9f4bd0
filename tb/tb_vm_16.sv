// tb_vm_16: checks the 16x16-bit Vedic multiplier against the * operator on
// corner operands, on operand pairs that make the second partial-sum adder
// carry, and on random operands.
module tb_vm_16;
  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic [31:0] q;

  vm_16 dut (.a(a), .b(b), .q(q));

  task automatic chk(logic [15:0] x, logic [15:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (q !== 32'(x) * 32'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d * %0d = %0d", x, y, q);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(16'hFFFF, 16'hFFFF);
    chk(16'hFFFF, 16'h0001);
    chk(16'h0000, 16'hABCD);
    chk(16'h8000, 16'h8000);
    chk(16'h00FF, 16'hFF00);
    // 15*11 pattern at every level: the middle sum plus the upper half of the
    // low product overflows the second adder
    chk(16'hFFFF, 16'hBBBB);
    chk(16'h00FF, 16'h00BB);
    chk(16'h000F, 16'h000B);
    for (int i = 0; i < 50000; i++) chk(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
