// vm_4: 4x4-bit Vedic multiplier built from four vm_2 multipliers.
//
// The operands are split into halves a = {ah, al}, b = {bh, bl}; the four vm_2
// instances form ah*bh, ah*bl, al*bh and al*bl concurrently ("vertically and
// crosswise"), and vedic_combine adds them with three 4-bit carry look-ahead
// adders into the 8-bit product. The recursive structure is the
// document's. Purely combinational, unsigned; in the modem the registers sit
// around the multiplier, in the mixers, not inside it.
module vm_4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);

  logic [3:0] hh, hl, lh, ll;

  vm_2 u_hh (.a(a[3:2]), .b(b[3:2]), .q(hh));
  vm_2 u_hl (.a(a[3:2]), .b(b[1:0]), .q(hl));
  vm_2 u_lh (.a(a[1:0]), .b(b[3:2]), .q(lh));
  vm_2 u_ll (.a(a[1:0]), .b(b[1:0]), .q(ll));

  vedic_combine #(.N(4)) u_sum (.hh(hh), .hl(hl), .lh(lh), .ll(ll), .q(q));

endmodule
