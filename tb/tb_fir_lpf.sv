// tb_fir_lpf: checks the low-pass filter's impulse response against the
// window-designed taps (as decimal values, quantised here to Q1.15), then
// random inputs with gaps against a convolution model; a second instance with
// the rectangular window is checked for length, symmetry and centre tap.
module tb_fir_lpf;
  import modem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic signed [23:0] x;
  logic x_valid = 0;
  logic signed [45:0] y, yr;
  logic y_valid, yr_valid;

  fir_lpf                      dut  (.clk, .rst, .x, .x_valid, .y, .y_valid);
  fir_lpf #(.WINDOW(WIN_RECT)) dutr (.clk, .rst, .x, .x_valid, .y(yr), .y_valid(yr_valid));

  always #5 clk = ~clk;

  // Hamming-window taps, first half plus centre
  real hw [21] = '{0.0010, 0.0011, -0.0008, -0.0024, 0.0002, 0.0045, 0.0021, -0.0069,
                   -0.0072, 0.0079, 0.0156, -0.0048, -0.0271, -0.0059, -0.0399, 0.0298,
                   -0.0519, -0.0831, 0.0603, 0.3097, 0.4357};
  longint h [41];
  longint hist [$];
  longint rimp [47];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(logic signed [23:0] v);
    x = v; x_valid = 1;
    @(posedge clk); #1;
    x_valid = 0;
  endtask

  initial begin
    for (int k = 0; k < 41; k++) begin
      real c;
      c = hw[(k <= 20) ? k : 40 - k] * 32768.0;
      h[k] = (c >= 0.0) ? longint'($floor(c + 0.5)) : -longint'($floor(-c + 0.5));
    end
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // impulse response
    for (int n = 0; n < 50; n++) begin
      push((n == 0) ? 24'sd1 : 24'sd0);
      checks++;
      if (y_valid !== 1'b1 || y !== 46'((n < 41) ? h[n] : 0)) begin
        failures++;
        $display("FAIL: impulse response tap %0d = %0d, expected %0d", n, y, (n < 41) ? h[n] : 0);
      end
      rimp[n < 47 ? n : 46] = (n < 47) ? longint'(yr) : rimp[46];
      if (n == 47) begin
        checks++;
        if (yr !== 0) begin failures++; $display("FAIL: rectangular filter longer than 47 taps"); end
      end
    end
    checks++;
    for (int k = 0; k < 23; k++)
      if (rimp[k] != rimp[46 - k]) begin
        failures++;
        $display("FAIL: rectangular taps %0d and %0d differ", k, 46 - k);
        break;
      end
    checks++;
    if (rimp[23] != 12386 || rimp[46] == 0) begin
      failures++;
      $display("FAIL: rectangular centre tap %0d, end tap %0d", rimp[23], rimp[46]);
    end
    // random samples with gaps
    for (int n = 0; n < 41; n++) hist.push_front(0);
    for (int n = 0; n < 2000; n++) begin
      longint acc;
      logic signed [23:0] v;
      if ($urandom % 3 == 0) begin
        @(posedge clk); #1;
        checks++;
        if (y_valid !== 1'b0) begin failures++; $display("FAIL: y_valid without input"); end
      end
      v = (n % 500 < 20) ? 24'sh7FFFFF : 24'($urandom);
      hist.push_front(longint'(v));
      void'(hist.pop_back());
      push(v);
      acc = 0;
      for (int k = 0; k < 41; k++) acc += h[k] * hist[k];
      checks++;
      if (y !== 46'(acc)) begin
        failures++;
        if (failures < 10) $display("FAIL: sample %0d got %0d expected %0d", n, y, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
