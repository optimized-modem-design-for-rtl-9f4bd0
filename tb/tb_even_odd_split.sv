// tb_even_odd_split: loads words into the even/odd separator and compares both
// halves with bit-by-bit expectations; also checks hold when load is low and
// the example word 1011110101011110 -> even 01111110, odd 11100011.
module tb_even_odd_split;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0;
  logic [15:0] data;
  logic [7:0] even, odd;

  even_odd_split dut (.clk, .rst, .load, .data, .even, .odd);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_words(logic [15:0] w);
    logic [7:0] e, o;
    for (int i = 0; i < 8; i++) begin
      e[i] = w[2*i];
      o[i] = w[2*i+1];
    end
    checks++;
    if (even !== e || odd !== o) begin
      failures++;
      $display("FAIL: word %b gave even %b odd %b, expected %b %b", w, even, odd, e, o);
    end
  endtask

  initial begin
    logic [15:0] last;
    data = '0;
    @(posedge clk); #1 rst = 0;
    expect_words(16'h0000);
    load = 1; data = 16'b1011110101011110;
    @(posedge clk); #1;
    checks++;
    if (even !== 8'b01111110 || odd !== 8'b11100011) begin
      failures++;
      $display("FAIL: example word gave %b %b", even, odd);
    end
    for (int i = 0; i < 1000; i++) begin
      load = 1'($urandom);
      data = 16'($urandom);
      if (load) last = data;
      else last = {odd[7], even[7], odd[6], even[6], odd[5], even[5], odd[4], even[4],
                   odd[3], even[3], odd[2], even[2], odd[1], even[1], odd[0], even[0]};
      @(posedge clk); #1;
      expect_words(last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
