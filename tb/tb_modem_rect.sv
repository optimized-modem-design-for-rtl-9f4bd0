// tb_modem_rect: end-to-end method-1 loop with the rectangular-window
// (47-tap) low-pass filter. Random words, including 0000, FFFF and BD5E, are
// sent through modulator and demodulator with random stalls, and every word
// must come back unchanged and in order.
module tb_modem_rect;
  import modem_pkg::*;
  int checks = 0, failures = 0, stalls = 0, words = 0;
  logic clk = 0, rst = 1, en = 0;
  logic [15:0] m1_data_in, m1_data_out;
  logic m1_data_take, m1_qpsk_valid, m1_data_valid, m2_valid;
  logic signed [16:0] m1_qpsk;
  logic [63:0] m2_q;

  modem_top #(.WINDOW(WIN_RECT)) dut (
    .clk, .rst, .en, .m1_data_in, .m1_data_take, .m1_qpsk, .m1_qpsk_valid,
    .m1_data_out, .m1_data_valid, .m2_en(1'b0), .m2_data_in(16'h0000), .m2_q, .m2_valid);

  always #5 clk = ~clk;

  localparam int NWORDS = 80;
  logic [15:0] sent [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && en && m1_data_take) sent.push_back(m1_data_in);
    if (!rst && m1_data_valid) begin
      logic [15:0] w;
      checks++;
      words++;
      w = sent.pop_front();
      if (m1_data_out !== w) begin
        failures++;
        $display("FAIL: recovered %h, sent %h", m1_data_out, w);
      end
    end
  end

  initial begin
    int n;
    m1_data_in = 16'hBD5E;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    n = 0;
    while (n < NWORDS) begin
      bit took;
      en = ($urandom % 5) != 0;
      if (!en) stalls++;
      #1 took = m1_data_take;
      @(posedge clk); #1;
      if (took) begin
        n++;
        m1_data_in = (n == 1) ? 16'h0000 : (n == 2) ? 16'hFFFF : 16'($urandom);
      end
    end
    // the word taken last is still being sent: finish its symbol
    en = 1;
    repeat (63) @(posedge clk);
    #1 en = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (words != NWORDS || stalls == 0) begin
      failures++;
      $display("FAIL: %0d of %0d words recovered, %0d stalls", words, NWORDS, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
