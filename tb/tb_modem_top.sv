// tb_modem_top: end-to-end test of the modem at its default parameters.
// Method 1: random 16-bit words (and the corner words 0000, FFFF, BD5E) are
// offered on every word take, the modulator runs with random stalls, and every
// word must come back from the demodulator unchanged and in order; each sample
// on m1_qpsk is also compared with even*round(127 cos) + odd*round(127 sin)
// computed here. Method 2: random words with random stalls; every byte of
// m2_q must be the carrier phase its symbol selects. The test counts the
// mechanisms it exercised (stalls, negative samples, each symbol value) and
// fails if any never happened.
module tb_modem_top;
  int checks = 0, failures = 0;
  int m1_stalls = 0, m1_neg = 0, m1_words = 0, m2_stalls = 0;
  int used [4] = '{0, 0, 0, 0};
  logic clk = 0, rst = 1, en = 0, m2_en = 0;
  logic [15:0] m1_data_in, m1_data_out, m2_data_in;
  logic m1_data_take, m1_qpsk_valid, m1_data_valid, m2_valid;
  logic signed [16:0] m1_qpsk;
  logic [63:0] m2_q;

  modem_top dut (.clk, .rst, .en, .m1_data_in, .m1_data_take, .m1_qpsk, .m1_qpsk_valid,
                 .m1_data_out, .m1_data_valid, .m2_en, .m2_data_in, .m2_q, .m2_valid);

  always #5 clk = ~clk;

  function automatic int rnd127(real v);
    v = 127.0 * v;
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  localparam int NWORDS = 200;

  logic [15:0] sent [$];
  int exp_samples [$];
  int k1 = 0;
  logic [15:0] cur;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // method-1 stimulus and checks
  always @(posedge clk) begin
    if (!rst && en) begin
      int e, o;
      real th;
      if (m1_data_take) begin
        cur = m1_data_in;
        sent.push_back(cur);
      end
      e = 0; o = 0;
      for (int i = 0; i < 8; i++) begin
        e += int'(cur[2*i]) << i;
        o += int'(cur[2*i+1]) << i;
      end
      th = 2.0 * 3.14159265358979 * real'(k1 % 16) / 16.0;
      exp_samples.push_back(e * rnd127($cos(th)) + o * rnd127($sin(th)));
      k1++;
    end
    if (!rst && m1_qpsk_valid) begin
      int v;
      checks++;
      v = exp_samples.pop_front();
      if (m1_qpsk < 0) m1_neg++;
      if (m1_qpsk !== 17'(v)) begin
        failures++;
        $display("FAIL: sample %0d, expected %0d", m1_qpsk, v);
      end
    end
    if (!rst && m1_data_valid) begin
      logic [15:0] w;
      checks++;
      w = sent.pop_front();
      m1_words++;
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
      en = ($urandom % 6) != 0;
      if (!en) m1_stalls++;
      #1 took = m1_data_take;
      @(posedge clk); #1;
      if (took) begin
        n++;
        case (n)
          1: m1_data_in = 16'h0000;
          2: m1_data_in = 16'hFFFF;
          default: m1_data_in = 16'($urandom);
        endcase
      end
    end
    // finish the last symbol, then let the pipeline drain
    while (k1 % 64 != 0) begin
      en = 1;
      @(posedge clk); #1;
    end
    en = 0;
    repeat (20) @(posedge clk);
  end

  // method-2 stimulus and checks
  function automatic logic [7:0] ref_byte(int k, int s);
    return 8'(rnd127($sin(2.0 * 3.14159265358979 * real'((k + 4 * s) % 16) / 16.0)));
  endfunction

  initial begin
    int k2;
    logic [63:0] exp_q;
    logic pend;
    m2_data_in = '0;
    repeat (2) @(posedge clk);
    #1;
    k2 = 0;
    pend = 0;
    exp_q = '0;
    for (int n = 0; n < 4000; n++) begin
      logic [63:0] next_q;
      logic this_en;
      this_en = ($urandom % 4) != 0;
      if (!this_en) m2_stalls++;
      m2_en = this_en;
      m2_data_in = 16'($urandom);
      next_q = exp_q;
      if (this_en) begin
        for (int j = 0; j < 8; j++) begin
          next_q[8*j +: 8] = ref_byte(k2, int'(m2_data_in[2*j +: 2]));
          used[m2_data_in[2*j +: 2]]++;
        end
        k2 = (k2 + 1) % 16;
      end
      @(posedge clk); #1;
      checks++;
      if (m2_valid !== pend || m2_q !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL: m2_q %h, expected %h", m2_q, exp_q);
      end
      if (this_en) exp_q = next_q;
      pend = this_en;
    end
    m2_en = 0;
  end

  initial begin
    wait (!rst);
    wait (m1_words == NWORDS);
    repeat (100) @(posedge clk);
    $display("words %0d, m1 stalls %0d, negative samples %0d, m2 stalls %0d, symbols %0d/%0d/%0d/%0d",
             m1_words, m1_stalls, m1_neg, m2_stalls, used[0], used[1], used[2], used[3]);
    checks++;
    if (m1_stalls == 0 || m1_neg == 0 || m2_stalls == 0 ||
        used[0] == 0 || used[1] == 0 || used[2] == 0 || used[3] == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    checks++;
    if (sent.size() != 0 || exp_samples.size() != 0) begin
      failures++;
      $display("FAIL: %0d words / %0d samples outstanding", sent.size(), exp_samples.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
