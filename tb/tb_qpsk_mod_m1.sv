// tb_qpsk_mod_m1: feeds random words to the method-1 modulator with random
// stalls (en low) and compares every output sample with
// even*round(127 cos) + odd*round(127 sin), computed here with $cos/$sin, and
// checks the two-clock latency, the first-sample marker and the word take.
module tb_qpsk_mod_m1;
  int checks = 0, failures = 0, stalls = 0, negatives = 0;
  logic clk = 0, rst = 1, en = 0;
  logic [15:0] data_in;
  logic data_take, valid, first;
  logic signed [16:0] qpsk;

  qpsk_mod_m1 dut (.clk, .rst, .en, .data_in, .data_take, .qpsk, .valid, .first);

  always #5 clk = ~clk;

  function automatic int rnd127(real v);
    v = 127.0 * v;
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  typedef struct { int value; bit first; int cycle; } exp_t;
  exp_t q[$];
  int cycle = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model: runs on the enabled clocks
  int k = 0;
  logic [15:0] word;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && en) begin
      int e, o;
      real th;
      exp_t x;
      checks++;
      if (data_take !== (k % 64 == 0)) begin
        failures++;
        $display("FAIL: data_take=%b at symbol position %0d", data_take, k % 64);
      end
      if (k % 64 == 0) word = data_in;
      e = 0; o = 0;
      for (int i = 0; i < 8; i++) begin
        e += int'(word[2*i]) << i;
        o += int'(word[2*i+1]) << i;
      end
      th = 2.0 * 3.14159265358979 * real'(k % 16) / 16.0;
      x.value = e * rnd127($cos(th)) + o * rnd127($sin(th));
      x.first = (k % 64 == 0);
      x.cycle = cycle;
      q.push_back(x);
      k++;
    end
    if (!rst && valid) begin
      exp_t x;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected sample");
      end else begin
        x = q.pop_front();
        if (qpsk < 0) negatives++;
        if (qpsk !== 17'(x.value) || first !== x.first || cycle - x.cycle != 2) begin
          failures++;
          $display("FAIL: got %0d first %b after %0d clocks, expected %0d first %b",
                   qpsk, first, cycle - x.cycle, x.value, x.first);
        end
      end
    end
  end

  initial begin
    data_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom % 8) != 0;
      if (!en) stalls++;
      data_in = (i < 70) ? 16'hFFFF : 16'($urandom);
      @(posedge clk); #1;
    end
    en = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0 || stalls == 0 || negatives == 0) begin
      failures++;
      $display("FAIL: %0d samples never came out, stalls %0d, negative samples %0d",
               q.size(), stalls, negatives);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
