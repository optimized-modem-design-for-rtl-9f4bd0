// carrier_lut: look-up-table carrier generator, one 8-bit signed sample per
// enabled clock.
//
// A 4-bit phase counter walks through the 16-entry sine table of modem_pkg
// (amplitude 127); PHASE_OFFSET table steps of 90/4 = 22.5 degrees each shift
// the wave, so offsets 0, 4, 8 and 12 give sine, cosine, -sine and -cosine.
// The sample output is registered: when en is high the sample for the current
// phase is loaded and the phase advances. When sync is high together with en,
// the phase restarts at 0 on that cycle, which lets a receiver lock its
// carriers to the start of a symbol. Reset clears the phase and the sample.
// Carrier generation by a look-up table and the 16-sample, 127-amplitude
// shape follow the document; the sync input is this design's.
module carrier_lut
  import modem_pkg::*;
#(
  parameter int unsigned PHASE_OFFSET = 0
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  input  logic     sync,
  output carrier_t sample,
  output logic [3:0] phase      // phase the next enabled sample will use
);

  logic [3:0] phase_q, phase_now;

  assign phase_now = sync ? 4'd0 : phase_q;
  assign phase     = phase_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_q <= 4'd0;
      sample  <= '0;
    end else if (en) begin
      sample  <= sine_sample(phase_now + 4'(PHASE_OFFSET));
      phase_q <= phase_now + 4'd1;
    end
  end

endmodule
