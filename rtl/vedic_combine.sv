// vedic_combine: adds the four half-size partial products of an NxN Vedic
// multiplier into the 2N-bit product, with three N-bit carry look-ahead adders.
//
// With a = {ah, al} and b = {bh, bl} (halves of H = N/2 bits):
//   adder 1: ah*bl + al*bh                          -> m,  carry ca1
//   adder 2: m + upper half of al*bl                -> n,  carry ca2
//   adder 3: ah*bh + {ca1 | ca2, upper half of n}   -> product bits 2N-1..N
// The product's low H bits are those of al*bl and the next H bits those of n.
// This is the arrangement the document draws for the 4-, 8- and 16-bit
// multipliers. Only its 16-bit drawing feeds ca2 (through an OR with ca1) into
// the third adder; the 4- and 8-bit drawings leave ca2 open, which loses 2^(N+H)
// for inputs such as 15*11 in 4 bits, so every size here uses the OR. ca1 and
// ca2 are never both set, and the third adder cannot carry out.
// Purely combinational, unsigned.
module vedic_combine #(
  parameter int N = 4
) (
  input  logic [N-1:0]   hh,     // ah * bh
  input  logic [N-1:0]   hl,     // ah * bl
  input  logic [N-1:0]   lh,     // al * bh
  input  logic [N-1:0]   ll,     // al * bl
  output logic [2*N-1:0] q
);

  localparam int H = N / 2;

  logic [N-1:0] m, n, hi;
  logic         ca1, ca2;
  logic         unused_ca3;   // always 0: the product fits in 2N bits

  cla_adder #(.WIDTH(N)) u_add1 (.a(hl), .b(lh), .cin(1'b0), .s(m), .cout(ca1));
  cla_adder #(.WIDTH(N)) u_add2 (.a(m), .b({{H{1'b0}}, ll[N-1:H]}), .cin(1'b0),
                                 .s(n), .cout(ca2));
  cla_adder #(.WIDTH(N)) u_add3 (.a(hh), .b({{(H-1){1'b0}}, ca1 | ca2, n[N-1:H]}),
                                 .cin(1'b0), .s(hi), .cout(unused_ca3));

  assign q = {hi, n[H-1:0], ll[H-1:0]};

endmodule
