// symbol_split: cuts a 16-bit word into eight 2-bit QPSK symbols and holds them.
//
// Symbol k is bits 2k+1..2k of the word (s[0] = a[1:0], ..., s[7] = a[15:14]),
// the division the document's method-2 simulation shows (a = -25489 gives
// s7..s0 = 10, 01, 11, 00, 01, 10, 11, 11). The symbols are registered: they
// load when load is high, change one clock later, and reset clears them; the
// register is this design's choice, keeping them in step with the registered
// carrier phases.
module symbol_split (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [15:0]      a,
  output logic [7:0][1:0]  s
);

  always_ff @(posedge clk) begin
    if (rst)       s <= '0;
    else if (load) for (int k = 0; k < 8; k++) s[k] <= a[2*k +: 2];
  end

endmodule
