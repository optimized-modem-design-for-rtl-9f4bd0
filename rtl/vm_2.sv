// vm_2: 2x2-bit Vedic (Urdhva-Tiryakbhyam, "vertically and crosswise") multiplier.
//
// For a = a1a0 and b = b1b0: the vertical product a0b0 is bit 0; the two
// crosswise products a1b0 and a0b1 are added by a half adder, giving bit 1 and
// carry c1; c1 is added to the vertical product a1b1 by a second half adder,
// giving bit 2 and, as its carry, bit 3. The structure is the document's.
// Purely combinational, unsigned.
module vm_2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  logic s1, c1, s2, c2;

  assign s1 = (a[1] & b[0]) ^ (a[0] & b[1]);     // crosswise half adder
  assign c1 = (a[1] & b[0]) & (a[0] & b[1]);
  assign s2 = c1 ^ (a[1] & b[1]);                // upper vertical half adder
  assign c2 = c1 & (a[1] & b[1]);

  assign q = {c2, s2, s1, a[0] & b[0]};

endmodule
