// tb_cla_adder: checks the carry look-ahead adder against the + operator,
// exhaustively at 4 bits and on random and corner operands at 16 bits.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic [15:0] a16, b16, s16;
  logic        c4, c16, co4, co16;

  cla_adder #(.WIDTH(4)) dut4  (.a(a4), .b(b4), .cin(c4), .s(s4), .cout(co4));
  cla_adder                dut16 (.a(a16), .b(b16), .cin(c16), .s(s16), .cout(co16));

  task automatic check16(logic [15:0] x, logic [15:0] y, logic c);
    logic [16:0] exp;
    a16 = x; b16 = y; c16 = c;
    #1;
    exp = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      $display("FAIL 16: %h + %h + %b = %h, expected %h", x, y, c, {co16, s16}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(c4)) begin
        failures++;
        $display("FAIL 4: %h + %h + %b = %h", a4, b4, c4, {co4, s4});
      end
    end
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h5555, 16'hAAAA, 1'b1);
    check16(16'h7FFF, 16'h0001, 1'b0);
    for (int i = 0; i < 20000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
