// vm_8: 8x8-bit Vedic multiplier built from four vm_4 multipliers.
//
// The operands are split into halves a = {ah, al}, b = {bh, bl}; the four vm_4
// instances form ah*bh, ah*bl, al*bh and al*bl concurrently ("vertically and
// crosswise"), and vedic_combine adds them with three 8-bit carry look-ahead
// adders into the 16-bit product. The recursive structure is the
// document's. Purely combinational, unsigned; in the modem the registers sit
// around the multiplier, in the mixers, not inside it.
module vm_8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] q
);

  logic [7:0] hh, hl, lh, ll;

  vm_4 u_hh (.a(a[7:4]), .b(b[7:4]), .q(hh));
  vm_4 u_hl (.a(a[7:4]), .b(b[3:0]), .q(hl));
  vm_4 u_lh (.a(a[3:0]), .b(b[7:4]), .q(lh));
  vm_4 u_ll (.a(a[3:0]), .b(b[3:0]), .q(ll));

  vedic_combine #(.N(8)) u_sum (.hh(hh), .hl(hl), .lh(lh), .ll(ll), .q(q));

endmodule
