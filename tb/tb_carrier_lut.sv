// tb_carrier_lut: runs a sine (offset 0) and a cosine (offset 4) generator and
// compares every sample with round(127 sin(2 pi k / 16 + offset)), computed here
// with $sin; also checks hold while en is low, restart on sync, and reset.
module tb_carrier_lut;
  import modem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, sync = 0;
  carrier_t s_sin, s_cos;
  logic [3:0] ph_sin, ph_cos;

  carrier_lut                     dut_sin (.clk, .rst, .en, .sync, .sample(s_sin), .phase(ph_sin));
  carrier_lut #(.PHASE_OFFSET(4)) dut_cos (.clk, .rst, .en, .sync, .sample(s_cos), .phase(ph_cos));

  always #5 clk = ~clk;

  function automatic int ref_sample(int k);
    real v;
    v = 127.0 * $sin(2.0 * 3.14159265358979 * real'(k % 16) / 16.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;      // model phase
    int hold_sin, hold_cos;
    @(posedge clk); #1 rst = 0;
    checks++;
    if (s_sin !== 0 || ph_sin !== 0) begin failures++; $display("FAIL: reset state"); end
    k = 0;
    for (int i = 0; i < 600; i++) begin
      en   = ($urandom % 4) != 0;
      sync = en && (($urandom % 50) == 0);
      hold_sin = int'(s_sin);
      hold_cos = int'(s_cos);
      if (sync) k = 0;
      @(posedge clk); #1;
      checks++;
      if (en) begin
        if (s_sin !== carrier_t'(ref_sample(k)) || s_cos !== carrier_t'(ref_sample(k + 4))) begin
          failures++;
          $display("FAIL: phase %0d sin %0d cos %0d", k, s_sin, s_cos);
        end
        k = (k + 1) % 16;
      end else if (s_sin !== carrier_t'(hold_sin) || s_cos !== carrier_t'(hold_cos)) begin
        failures++;
        $display("FAIL: sample changed while en low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
