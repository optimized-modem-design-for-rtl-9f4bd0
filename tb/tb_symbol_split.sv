// tb_symbol_split: loads words and checks the eight 2-bit symbols, including
// the word -25489 (symbols s7..s0 = -2, 1, -1, 0, 1, -2, -1, -1 as signed
// values), and that the symbols hold while load is low.
module tb_symbol_split;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0;
  logic [15:0] a;
  logic [7:0][1:0] s;
  int exp_signed [8] = '{-1, -1, -2, 1, 0, -1, 1, -2};   // s0 .. s7

  symbol_split dut (.clk, .rst, .load, .a, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] held;
    a = '0;
    @(posedge clk); #1 rst = 0;
    load = 1; a = 16'(-25489);
    @(posedge clk); #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (int'($signed(s[k])) != exp_signed[k]) begin
        failures++;
        $display("FAIL: s%0d = %0d, expected %0d", k, $signed(s[k]), exp_signed[k]);
      end
    end
    held = a;
    for (int n = 0; n < 1000; n++) begin
      load = 1'($urandom);
      a = 16'($urandom);
      if (load) held = a;
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (s[k] !== held[2*k +: 2]) begin
          failures++;
          $display("FAIL: word %h symbol %0d = %b", held, k, s[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
