// fir_lpf: the demodulator's direct-form FIR low-pass filter.
//
// y[n] = sum_k h[k] * x[n-k], with h the windowed-sinc low-pass prototype of
// modem_pkg: 41 taps for the Hamming window (the default) or 47 for the
// rectangular window, both quantised to signed Q1.15. Tap values and window
// choices are the document's; the fixed-point format, the full-precision
// output (no rounding or truncation: YW = XW + 16 + 6 bits) and the fully
// parallel constant-coefficient multipliers are this design's.
//
// Timing: each clock with x_valid high shifts x into the delay line and, one
// clock later, y holds the output for the window that now ends with x, with
// y_valid high. Reset clears the delay line, so the filter starts from rest.
module fir_lpf
  import modem_pkg::*;
#(
  parameter fir_window_e WINDOW = WIN_HAMMING,
  parameter int          XW     = 24,
  parameter int          YW     = XW + COEF_W + 6
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [XW-1:0] x,
  input  logic                 x_valid,
  output logic signed [YW-1:0] y,
  output logic                 y_valid
);

  localparam int NT = fir_taps(WINDOW);

  logic signed [XW-1:0] line [NT-1];        // x[n-1] .. x[n-NT+1]
  logic signed [XW-1:0] win  [NT];          // x[n]   .. x[n-NT+1]
  logic signed [YW-1:0] term [NT];
  logic signed [YW-1:0] acc;

  always_comb begin
    win[0] = x;
    for (int k = 1; k < NT; k++) win[k] = line[k-1];
  end

  for (genvar k = 0; k < NT; k++) begin : g_tap
    localparam logic signed [COEF_W-1:0] H = COEF_W'(fir_coef(WINDOW, k));
    assign term[k] = YW'(win[k]) * YW'(H);
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < NT; k++) acc = acc + term[k];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NT - 1; k++) line[k] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        for (int k = 0; k < NT - 1; k++) line[k] <= win[k];
        y <= acc;
      end
    end
  end

endmodule
