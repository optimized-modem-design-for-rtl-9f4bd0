// qpsk_mod_m1: the Vedic-multiplier / carry-look-ahead QPSK modulator
// ("method 1").
//
// A 16-bit data word is split into its 8 even and 8 odd bits. The even word
// multiplies the cosine carrier and the odd word the sine carrier, each in a
// Vedic multiplier, and a 16-bit carry look-ahead adder sums the in-phase and
// quadrature products into the modulated sample:
//     qpsk = even * cos(k) + odd * sin(k),   k = 0..15 per carrier period.
// This structure is the document's. Its choices made here: the words are
// unsigned and the carrier is signed (see carrier_mixer); the sum is 17 bits
// signed, the 16-bit adder's sum plus a sign bit recovered from the operand
// signs and its carry out, so it never overflows; and a word is held for a
// symbol of SYM_PERIODS whole carrier periods, which the demodulator needs.
//
// Interface and timing: while en is high one sample is produced per clock.
// On the first sample of a symbol (data_take high) data_in is captured; the
// caller must present the next word then. Samples appear on qpsk two clocks
// after the enabled cycle that produced them, with valid set and, for a
// symbol's first sample, first set. A low en freezes the symbol and carrier
// counters (a stall): the stream simply has a gap in valid.
module qpsk_mod_m1
  import modem_pkg::*;
#(
  parameter int SYM_PERIODS = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [15:0]        data_in,
  output logic               data_take,
  output logic signed [16:0] qpsk,
  output logic               valid,
  output logic               first
);

  localparam int SYM_LEN = SYM_PERIODS * CARRIER_STEPS;
  localparam int CNT_W   = $clog2(SYM_LEN);

  logic [CNT_W-1:0] cnt;
  logic [1:0]       valid_d, first_d;
  logic             sym_start;
  carrier_t         cos_s, sin_s;
  logic [3:0]       unused_cos_ph, unused_sin_ph;
  logic [7:0]       even, odd;
  logic signed [15:0] prod_i, prod_q;
  logic [15:0]      sum;
  logic             cout;

  assign sym_start = (cnt == '0);
  assign data_take = en && sym_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      valid_d <= '0;
      first_d <= '0;
    end else begin
      if (en) begin
        cnt <= (cnt == CNT_W'(SYM_LEN - 1)) ? '0 : cnt + 1'b1;
      end
      valid_d <= {valid_d[0], en};
      first_d <= {first_d[0], en && sym_start};
    end
  end

  // carriers and data word, registered in step
  carrier_lut #(.PHASE_OFFSET(4)) u_cos (
    .clk, .rst, .en, .sync(sym_start), .sample(cos_s), .phase(unused_cos_ph));
  carrier_lut #(.PHASE_OFFSET(0)) u_sin (
    .clk, .rst, .en, .sync(sym_start), .sample(sin_s), .phase(unused_sin_ph));

  even_odd_split u_split (
    .clk, .rst, .load(data_take), .data(data_in), .even(even), .odd(odd));

  carrier_mixer #(.DW(8)) u_mix_i (
    .clk, .rst, .mag(even), .neg(1'b0), .carrier(cos_s), .prod(prod_i));
  carrier_mixer #(.DW(8)) u_mix_q (
    .clk, .rst, .mag(odd), .neg(1'b0), .carrier(sin_s), .prod(prod_q));

  cla_adder #(.WIDTH(16)) u_sum (
    .a(prod_i), .b(prod_q), .cin(1'b0), .s(sum), .cout(cout));

  // 17th bit of the signed sum: sign extension of both operands plus the carry
  assign qpsk  = {prod_i[15] ^ prod_q[15] ^ cout, sum};
  assign valid = valid_d[1];
  assign first = first_d[1];

  initial begin
    assert (SYM_LEN == (1 << CNT_W)) else $fatal(1, "SYM_PERIODS must be a power of two");
  end

endmodule
