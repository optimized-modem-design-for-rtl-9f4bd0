// qpsk_demod_m1: coherent demodulator for the method-1 QPSK modulator.
//
// Each received sample is multiplied by the local cosine and sine carriers in
// Vedic multipliers, each product is low-pass filtered, a decision device turns
// each branch into an 8-bit word, and a 16-bit carry look-ahead adder merges the
// two words back into the 16-bit data word: the even word is spread onto bit
// positions 0, 2, .., 14 and the odd word onto 1, 3, .., 15, so the addition
// never carries and interleaves them. Multiplier, filter, decision device and
// adder in this order are the document's. The following are this design's own:
// the carriers are restarted by the transmitter's first-sample marker (a
// coherent receiver with shared symbol timing); a decision is taken over the
// last carrier period of each symbol, when the filter window holds only that
// symbol (needs SYM_PERIODS*16 - 16 >= taps - 1); sample magnitudes above
// 65535 are clipped before the 16-bit multiplier.
//
// Timing: one input sample per clock at most (in_valid); in_first marks a
// symbol's first sample. The recovered word appears on data_out with
// out_valid high four clocks after the symbol's last sample was accepted.
module qpsk_demod_m1
  import modem_pkg::*;
#(
  parameter int          SYM_PERIODS = 4,
  parameter fir_window_e WINDOW      = WIN_HAMMING
) (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [16:0] qpsk,
  input  logic               in_valid,
  input  logic               in_first,
  output logic [15:0]        data_out,
  output logic               out_valid
);

  localparam int SYM_LEN = SYM_PERIODS * CARRIER_STEPS;
  localparam int CNT_W   = $clog2(SYM_LEN);
  localparam int XW      = 24;
  localparam int YW      = XW + COEF_W + 6;
  localparam longint RECIP = decision_recip(WINDOW);

  // stage 0: sample and carriers
  logic [CNT_W-1:0]   pos, pos_now, pos0, pos1, pos2;
  logic               v0, v1;
  logic signed [16:0] q0;
  carrier_t           cos_s, sin_s;
  logic [3:0]         unused_cos_ph, unused_sin_ph;
  logic [15:0]        mag0;

  assign pos_now = in_first ? '0 : pos;

  always_ff @(posedge clk) begin
    if (rst) begin
      pos  <= '0;
      pos0 <= '0;
      pos1 <= '0;
      pos2 <= '0;
      q0   <= '0;
      v0   <= 1'b0;
      v1   <= 1'b0;
    end else begin
      if (in_valid) pos <= pos_now + 1'b1;
      q0   <= qpsk;
      pos0 <= pos_now;
      v0   <= in_valid;
      pos1 <= pos0;
      v1   <= v0;
      if (v1) pos2 <= pos1;
    end
  end

  carrier_lut #(.PHASE_OFFSET(4)) u_cos (
    .clk, .rst, .en(in_valid), .sync(in_first), .sample(cos_s), .phase(unused_cos_ph));
  carrier_lut #(.PHASE_OFFSET(0)) u_sin (
    .clk, .rst, .en(in_valid), .sync(in_first), .sample(sin_s), .phase(unused_sin_ph));

  // stage 1: mixing
  always_comb begin
    logic [16:0] m;
    m    = q0[16] ? 17'(-q0) : 17'(q0);
    mag0 = m[16] ? 16'hFFFF : m[15:0];
  end

  logic signed [XW-1:0] mix_i, mix_q;

  carrier_mixer #(.DW(16)) u_mix_i (
    .clk, .rst, .mag(mag0), .neg(q0[16]), .carrier(cos_s), .prod(mix_i));
  carrier_mixer #(.DW(16)) u_mix_q (
    .clk, .rst, .mag(mag0), .neg(q0[16]), .carrier(sin_s), .prod(mix_q));

  // stage 2: low-pass filters
  logic signed [YW-1:0] y_i, y_q;
  logic                 yv_i, unused_yv_q;

  fir_lpf #(.WINDOW(WINDOW), .XW(XW)) u_lpf_i (
    .clk, .rst, .x(mix_i), .x_valid(v1), .y(y_i), .y_valid(yv_i));
  fir_lpf #(.WINDOW(WINDOW), .XW(XW)) u_lpf_q (
    .clk, .rst, .x(mix_q), .x_valid(v1), .y(y_q), .y_valid(unused_yv_q));

  // stage 3: decisions over the symbol's last carrier period
  logic acc_en, dump;
  logic [7:0] even, odd;
  logic       wv, unused_wv_q;

  assign acc_en = yv_i && (pos2 >= CNT_W'(SYM_LEN - CARRIER_STEPS));
  assign dump   = yv_i && (pos2 == CNT_W'(SYM_LEN - 1));

  decision_device #(.YW(YW), .RECIP(RECIP), .SHIFT(DEC_SHIFT)) u_dec_i (
    .clk, .rst, .y(y_i), .acc_en, .dump, .word(even), .word_valid(wv));
  decision_device #(.YW(YW), .RECIP(RECIP), .SHIFT(DEC_SHIFT)) u_dec_q (
    .clk, .rst, .y(y_q), .acc_en, .dump, .word(odd), .word_valid(unused_wv_q));

  // merge: spread the two words onto alternate bits and add them
  logic [15:0] even_sp, odd_sp;
  logic        unused_cout;

  always_comb begin
    even_sp = '0;
    odd_sp  = '0;
    for (int i = 0; i < 8; i++) begin
      even_sp[2*i]   = even[i];
      odd_sp[2*i+1]  = odd[i];
    end
  end

  cla_adder #(.WIDTH(16)) u_merge (
    .a(even_sp), .b(odd_sp), .cin(1'b0), .s(data_out), .cout(unused_cout));

  assign out_valid = wv;

  initial begin
    assert (SYM_LEN == (1 << CNT_W)) else $fatal(1, "SYM_PERIODS must be a power of two");
    assert (SYM_LEN - CARRIER_STEPS >= fir_taps(WINDOW) - 1)
      else $fatal(1, "symbol too short for the filter to settle");
  end

endmodule
