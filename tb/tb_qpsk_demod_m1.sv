// tb_qpsk_demod_m1: builds method-1 sample streams here (even*cos + odd*sin
// with the carriers computed by $cos/$sin, a word per 64 samples, random gaps,
// and on some symbols a small random disturbance) and checks that the
// demodulator returns every word, in order, four clocks after the symbol's
// last sample.
module tb_qpsk_demod_m1;
  int checks = 0, failures = 0, noisy = 0, gaps = 0;
  logic clk = 0, rst = 1;
  logic signed [16:0] qpsk;
  logic in_valid = 0, in_first = 0;
  logic [15:0] data_out;
  logic out_valid;

  qpsk_demod_m1 dut (.clk, .rst, .qpsk, .in_valid, .in_first, .data_out, .out_valid);

  always #5 clk = ~clk;

  function automatic int rnd127(real v);
    v = 127.0 * v;
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  logic [15:0] sent [$];
  int last_cycle [$];
  int cycle = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && out_valid) begin
      checks++;
      if (sent.size() == 0) begin
        failures++;
        $display("FAIL: unexpected word");
      end else begin
        logic [15:0] w;
        int c;
        w = sent.pop_front();
        c = last_cycle.pop_front();
        if (data_out !== w || cycle - c != 4) begin
          failures++;
          $display("FAIL: got %h after %0d clocks, expected %h", data_out, cycle - c, w);
        end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_word(logic [15:0] w, bit noise);
    int e, o;
    e = 0; o = 0;
    for (int i = 0; i < 8; i++) begin
      e += int'(w[2*i]) << i;
      o += int'(w[2*i+1]) << i;
    end
    for (int k = 0; k < 64; k++) begin
      real th;
      int v;
      while ($urandom % 10 == 0) begin
        in_valid = 0;
        gaps++;
        @(posedge clk); #1;
      end
      th = 2.0 * 3.14159265358979 * real'(k % 16) / 16.0;
      v = e * rnd127($cos(th)) + o * rnd127($sin(th));
      if (noise) v += int'($urandom % 41) - 20;
      qpsk = 17'(v);
      in_valid = 1;
      in_first = (k == 0);
      if (k == 63) begin
        sent.push_back(w);
        last_cycle.push_back(cycle);
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
    in_first = 0;
  endtask

  initial begin
    qpsk = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    send_word(16'hBD5E, 0);
    send_word(16'h0000, 0);
    send_word(16'hFFFF, 0);
    send_word(16'hAAAA, 0);
    send_word(16'h5555, 0);
    for (int n = 0; n < 150; n++) begin
      bit nz;
      nz = ($urandom % 3 == 0);
      if (nz) noisy++;
      send_word(16'($urandom), nz);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (sent.size() != 0 || gaps == 0 || noisy == 0) begin
      failures++;
      $display("FAIL: %0d words never came back (gaps %0d, noisy %0d)", sent.size(), gaps, noisy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
