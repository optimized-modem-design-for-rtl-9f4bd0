// decision_device: decides which 8-bit word a demodulator branch received.
//
// The filtered branch signal is summed over the last carrier period of a
// symbol (the samples marked acc_en). For a word d that sum is d times a known
// gain (the carrier's energy per period times the filter's DC gain, see
// modem_pkg), so the decision is the nearest integer to sum / gain, formed as
// (sum * RECIP + 2^(SHIFT-1)) >> SHIFT with RECIP = round(2^SHIFT / gain), and
// limited to 0..255. The document names this block and places it after the
// low-pass filter but does not say how it decides; this period-sum and
// nearest-word rule is this design's, the simplest one that recovers the 8-bit
// words the modulator sends.
//
// Timing: on a clock with dump high (which must also have acc_en high, the
// period's last sample) the word is decided from the sum including that
// sample; word and word_valid appear one clock later, and the sum restarts.
module decision_device #(
  parameter int     YW     = 46,
  parameter longint RECIP  = 79250,   // round(2^SHIFT / gain), Hamming filter
  parameter int     SHIFT  = 48
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [YW-1:0] y,
  input  logic                 acc_en,
  input  logic                 dump,
  output logic [7:0]           word,
  output logic                 word_valid
);

  localparam int AW = YW + 4;            // sum of 16 samples
  localparam int PW = AW + 26;           // sum * RECIP, RECIP < 2^25

  logic signed [AW-1:0] acc, total;
  logic signed [PW-1:0] scaled;
  logic signed [PW-1:0] rounded;

  assign total   = acc + AW'(y);
  assign scaled  = PW'(total) * PW'(RECIP);
  assign rounded = (scaled + (PW'(1) <<< (SHIFT - 1))) >>> SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= dump;
      if (dump) begin
        acc <= '0;
        if (rounded < 0)          word <= 8'd0;
        else if (rounded > 255)   word <= 8'd255;
        else                      word <= 8'(rounded);
      end else if (acc_en) begin
        acc <= total;
      end
    end
  end

  initial begin
    assert (RECIP > 0 && RECIP < (longint'(1) << 25))
      else $fatal(1, "decision_device: RECIP out of range");
  end

endmodule
