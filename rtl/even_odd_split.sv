// even_odd_split: the modulator's even/odd data separator. It captures a 16-bit
// data word and presents its even and odd bits as two 8-bit words.
//
// even = {d[14], d[12], ..., d[0]} and odd = {d[15], d[13], ..., d[1]}, each
// keeping the original bit order. Splitting the 16-bit input into two 8-bit
// components is the document's; the bit order was read from its simulation
// trace, where 1011110101011110 splits into 01111110 and 11100011. Holding the
// word in a register (loaded when load is high, cleared by reset) is this
// design's choice: the modulator keeps one word for a whole symbol.
// The outputs change one clock after load.
module even_odd_split (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [15:0] data,
  output logic [7:0]  even,
  output logic [7:0]  odd
);

  always_ff @(posedge clk) begin
    if (rst) begin
      even <= '0;
      odd  <= '0;
    end else if (load) begin
      for (int i = 0; i < 8; i++) begin
        even[i] <= data[2*i];
        odd[i]  <= data[2*i+1];
      end
    end
  end

endmodule
