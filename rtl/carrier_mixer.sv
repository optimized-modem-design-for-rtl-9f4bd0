// carrier_mixer: multiplies a sign-magnitude operand by a signed carrier sample
// with a Vedic multiplier, and registers the signed product.
//
// The document's Vedic multipliers are unsigned, while the carrier swings
// between -127 and +127. This design therefore multiplies magnitudes: the
// operand magnitude `mag` (DW bits) times the carrier magnitude (8 bits, zero
// extended to DW) in a vm_8 (DW = 8) or vm_16 (DW = 16), and negates the
// product when exactly one of the signs is negative. The negation is ~p + 1,
// formed by a carry look-ahead adder with its carry in set. The product fits in
// DW+8 signed bits (at most (2^DW - 1) * 128), so the multiplier's upper
// product bits are always zero and are left unused. One clock of latency, no enable:
// the product register loads every cycle and is cleared by reset.
module carrier_mixer
  import modem_pkg::*;
#(
  parameter int DW = 8          // 8 or 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [DW-1:0]       mag,
  input  logic                neg,
  input  carrier_t            carrier,
  output logic signed [DW+7:0] prod
);

  logic [7:0]      cmag;
  logic [2*DW-1:0] p;
  logic [DW+7:0]   p_neg;
  logic            flip;
  logic            unused_cout;

  assign cmag = carrier[7] ? 8'(-carrier) : 8'(carrier);
  assign flip = neg ^ carrier[7];

  generate
    if (DW == 8) begin : g_vm8
      vm_8 u_mul (.a(mag), .b(cmag), .q(p));
    end else begin : g_vm16
      vm_16 u_mul (.a(16'(mag)), .b({8'd0, cmag}), .q(p));
    end
  endgenerate

  cla_adder #(.WIDTH(DW+8)) u_neg (
    .a(~p[DW+7:0]), .b('0), .cin(1'b1), .s(p_neg), .cout(unused_cout)
  );

  always_ff @(posedge clk) begin
    if (rst) prod <= '0;
    else     prod <= flip ? $signed(p_neg) : $signed(p[DW+7:0]);
  end

  initial begin
    assert (DW == 8 || DW == 16) else $fatal(1, "carrier_mixer: DW must be 8 or 16");
  end

endmodule
