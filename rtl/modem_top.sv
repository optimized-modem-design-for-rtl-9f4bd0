// modem_top: the QPSK modem. The method-1 modulator (Vedic multipliers and a
// carry look-ahead adder) feeds its samples straight into the method-1
// demodulator, and the method-2 multiplexer modulator stands beside them.
//
// Method 1: while en is high a sample is produced per clock; m1_data_take
// marks the clock on which m1_data_in is taken as the next 16-bit word, which
// is then sent for SYM_PERIODS carrier periods (16 samples each). The sample
// stream is brought out on m1_qpsk / m1_qpsk_valid (where the board's DAC would
// connect) and looped into the demodulator, whose recovered words appear on
// m1_data_out with m1_data_valid. A word's recovered copy comes out 6 clocks
// after the last of its samples was produced (2 in the modulator, 4 in the
// demodulator). Method 2 has its own enable: each clock edge with m2_en high takes a word
// from m2_data_in, and the next edge loads the eight phase-selected carrier
// bytes into m2_q and raises m2_valid.
//
// The loop-back of modulator into demodulator with shared timing is this
// design's way of joining the document's modulator and demodulator.
module modem_top
  import modem_pkg::*;
#(
  parameter int          SYM_PERIODS = 4,
  parameter fir_window_e WINDOW      = WIN_HAMMING
) (
  input  logic               clk,
  input  logic               rst,
  // method 1
  input  logic               en,
  input  logic [15:0]        m1_data_in,
  output logic               m1_data_take,
  output logic signed [16:0] m1_qpsk,
  output logic               m1_qpsk_valid,
  output logic [15:0]        m1_data_out,
  output logic               m1_data_valid,
  // method 2
  input  logic               m2_en,
  input  logic [15:0]        m2_data_in,
  output logic [63:0]        m2_q,
  output logic               m2_valid
);

  logic m1_first;

  qpsk_mod_m1 #(.SYM_PERIODS(SYM_PERIODS)) u_mod1 (
    .clk, .rst, .en, .data_in(m1_data_in), .data_take(m1_data_take),
    .qpsk(m1_qpsk), .valid(m1_qpsk_valid), .first(m1_first));

  qpsk_demod_m1 #(.SYM_PERIODS(SYM_PERIODS), .WINDOW(WINDOW)) u_demod1 (
    .clk, .rst, .qpsk(m1_qpsk), .in_valid(m1_qpsk_valid), .in_first(m1_first),
    .data_out(m1_data_out), .out_valid(m1_data_valid));

  qpsk_mod_m2 u_mod2 (
    .clk, .rst, .en(m2_en), .a(m2_data_in), .q(m2_q), .valid(m2_valid));

endmodule
