// cla_adder: WIDTH-bit carry look-ahead adder, s = a + b + cin, with carry out.
//
// Each bit column forms a propagate P(i) = A(i) xor B(i) and a generate
// G(i) = A(i) and B(i); the sum bit is S(i) = P(i) xor C(i). Instead of letting
// C(i+1) = G(i) + P(i)C(i) ripple, every carry is expanded into its two-level
// look-ahead form, C(i+1) = G(i) + P(i)G(i-1) + ... + P(i)..P(0)Cin, so all
// carries depend only on the operand bits and Cin. These equations are the
// document's; writing the expansion flat (rather than in 4-bit look-ahead
// groups) is this design's choice. Purely combinational; the multipliers use
// 4-, 8- and 16-bit instances, the modulator a 16-bit one.
module cla_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH-1:0] p, g;
  logic [WIDTH:0]   c;

  assign p = a ^ b;
  assign g = a & b;

  always_comb begin
    logic term;
    c[0] = cin;
    for (int i = 0; i < WIDTH; i++) begin
      c[i+1] = g[i];
      term   = p[i];
      for (int j = i - 1; j >= 0; j--) begin
        c[i+1] = c[i+1] | (term & g[j]);
        term   = term & p[j];
      end
      c[i+1] = c[i+1] | (term & cin);
    end
  end

  assign s    = p ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];

endmodule
