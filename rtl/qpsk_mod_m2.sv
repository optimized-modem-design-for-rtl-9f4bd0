// qpsk_mod_m2: the multiplexer QPSK modulator ("method 2").
//
// Four look-up-table carriers run side by side at 0, 90, 180 and 270 degrees.
// The 16-bit input word is cut into eight 2-bit symbols, and for each symbol a
// 4-to-1 multiplexer passes the carrier whose phase the symbol selects, so no
// multiplier is needed: the output is eight carrier samples in parallel, one
// byte per symbol, byte k (q[8k+7:8k]) belonging to symbol k. The four phased
// carriers, the 16-bit to eight 2-bit split, the eight multiplexers and the
// 64-bit output are the document's. The mapping of symbol value to phase is
// this design's: 00 -> 0, 01 -> 90, 10 -> 180, 11 -> 270 degrees.
//
// Timing: while en is high the carriers advance one 22.5-degree step per
// clock. A word on a is taken at a clock edge where en is high, together with
// the carrier samples of that step; at the next edge the selected bytes are
// loaded into q and valid goes high. q holds its value after en goes low. Reset clears everything and
// sets all four carriers to phase 0.
module qpsk_mod_m2
  import modem_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [15:0] a,
  output logic [63:0] q,
  output logic        valid
);

  carrier_t        ph [4];          // sine_1 at 0, 90, 180, 270 degrees
  logic [3:0]      unused_phase [4];
  logic [7:0][1:0] s;
  logic            en_d;

  for (genvar p = 0; p < 4; p++) begin : g_carrier
    carrier_lut #(.PHASE_OFFSET(4 * p)) u_lut (
      .clk, .rst, .en, .sync(1'b0), .sample(ph[p]), .phase(unused_phase[p]));
  end

  symbol_split u_split (.clk, .rst, .load(en), .a(a), .s(s));

  always_ff @(posedge clk) begin
    if (rst) begin
      q     <= '0;
      en_d  <= 1'b0;
      valid <= 1'b0;
    end else begin
      en_d  <= en;
      valid <= en_d;
      if (en_d)
        for (int k = 0; k < 8; k++) q[8*k +: 8] <= ph[s[k]];
    end
  end

endmodule
