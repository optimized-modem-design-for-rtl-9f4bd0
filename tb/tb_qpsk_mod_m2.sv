// tb_qpsk_mod_m2: drives the multiplexer modulator with random words and
// stalls and checks every output byte against round(127 sin(2 pi (k + 4 s) / 16))
// for carrier step k and symbol value s, computed here with $sin; also checks
// that every symbol value was used and that q holds while en is low.
module tb_qpsk_mod_m2;
  int checks = 0, failures = 0;
  int used [4] = '{0, 0, 0, 0};
  logic clk = 0, rst = 1, en = 0;
  logic [15:0] a;
  logic [63:0] q;
  logic valid;

  qpsk_mod_m2 dut (.clk, .rst, .en, .a, .q, .valid);

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_byte(int k, int s);
    real v;
    v = 127.0 * $sin(2.0 * 3.14159265358979 * real'((k + 4 * s) % 16) / 16.0);
    return 8'((v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5)));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    logic [63:0] exp_q;
    logic pend;
    a = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    k = 0;
    pend = 0;
    exp_q = '0;
    for (int n = 0; n < 3000; n++) begin
      logic [63:0] next_q;
      logic this_en;
      this_en = ($urandom % 5) != 0;
      en = this_en;
      a = (n == 5) ? 16'(-25489) : 16'($urandom);
      next_q = exp_q;
      if (this_en) begin
        for (int j = 0; j < 8; j++) begin
          next_q[8*j +: 8] = ref_byte(k, int'(a[2*j +: 2]));
          used[a[2*j +: 2]]++;
        end
        k = (k + 1) % 16;
      end
      @(posedge clk); #1;
      // the bytes of the word taken one edge earlier are now in q
      checks++;
      if (valid !== pend || q !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL: q %h valid %b, expected %h %b", q, valid, exp_q, pend);
      end
      if (this_en) exp_q = next_q;
      pend = this_en;
    end
    checks++;
    if (used[0] == 0 || used[1] == 0 || used[2] == 0 || used[3] == 0) begin
      failures++;
      $display("FAIL: a symbol value was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
