// tb_decision_device: gives the decision device sums of 16 samples equal to
// d * GAIN plus an error below 0.45 * GAIN and expects d back; negative sums
// must give 0 and sums beyond 255 * GAIN must give 255. The gain and its
// reciprocal are this test's own, not the modem's.
module tb_decision_device;
  localparam longint GAIN  = 64'd3_000_000_017;
  localparam int     SHIFT = 48;
  localparam longint RECIP = 93825;   // round(2^48 / GAIN)

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic signed [45:0] y;
  logic acc_en = 0, dump = 0;
  logic [7:0] word;
  logic word_valid;

  decision_device #(.YW(46), .RECIP(RECIP), .SHIFT(SHIFT)) dut (
    .clk, .rst, .y, .acc_en, .dump, .word, .word_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_sum(longint total, int exp_word);
    longint part, left;
    left = total;
    for (int i = 0; i < 16; i++) begin
      part = (i == 15) ? left : (total / 16) + (longint'($urandom) % 1000) - 500;
      left -= part;
      y = 46'(part);
      acc_en = 1;
      dump = (i == 15);
      @(posedge clk); #1;
      acc_en = 0; dump = 0;
      checks++;
      if (word_valid !== (i == 15)) begin failures++; $display("FAIL: word_valid timing"); end
      // idle clocks that must not be summed
      if ($urandom % 4 == 0) begin
        y = 46'sd123456789;
        @(posedge clk); #1;
      end
    end
    checks++;
    if (word !== 8'(exp_word)) begin
      failures++;
      $display("FAIL: sum %0d gave %0d, expected %0d", total, word, exp_word);
    end
  endtask

  initial begin
    y = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 600; n++) begin
      int d;
      longint err;
      d = (n < 256) ? n : int'($urandom % 256);
      err = (longint'($urandom) % 2_000_000_000) - 1_000_000_000;   // |err| < 0.34 GAIN
      run_sum(longint'(d) * GAIN + err, d);
    end
    run_sum(-5 * GAIN, 0);
    run_sum(300 * GAIN, 255);
    run_sum(255 * GAIN + GAIN / 3, 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
