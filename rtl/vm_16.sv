// vm_16: 16x16-bit Vedic multiplier built from four vm_8 multipliers.
//
// The operands are split into halves a = {ah, al}, b = {bh, bl}; the four vm_8
// instances form ah*bh, ah*bl, al*bh and al*bl concurrently ("vertically and
// crosswise"), and vedic_combine adds them with three 16-bit carry look-ahead
// adders into the 32-bit product. The recursive structure is the
// document's. Purely combinational, unsigned; in the modem the registers sit
// around the multiplier, in the mixers, not inside it.
module vm_16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] q
);

  logic [15:0] hh, hl, lh, ll;

  vm_8 u_hh (.a(a[15:8]), .b(b[15:8]), .q(hh));
  vm_8 u_hl (.a(a[15:8]), .b(b[7:0]), .q(hl));
  vm_8 u_lh (.a(a[7:0]), .b(b[15:8]), .q(lh));
  vm_8 u_ll (.a(a[7:0]), .b(b[7:0]), .q(ll));

  vedic_combine #(.N(16)) u_sum (.hh(hh), .hl(hl), .lh(lh), .ll(ll), .q(q));

endmodule
