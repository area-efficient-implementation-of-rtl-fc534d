// bec: Binary to Excess-1 Converter, x = b + 1 (mod 2^W).
//
// It stands in for the second ripple-carry adder (the one with carry-in 1) of a regular
// carry select adder: given the sum computed with carry-in 0, the BEC produces the sum for
// carry-in 1 with far fewer gates than an adder. Bit 0 is inverted and every higher bit is
// toggled when all the bits below it are 1:
//   x[0] = ~b[0],   x[i] = b[i] ^ (b[i-1] & ... & b[0])
// For W = 3 this is the 3-bit converter of the design (000->001, 001->010, ... 100->101).
// The running AND is built as a chain, as in the drawn 3-bit converter. Combinational.
module bec #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);
  logic [W-1:0] all_ones_below;  // all_ones_below[i] = &b[i-1:0]

  assign all_ones_below[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_and
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
  end
  assign x = b ^ all_ones_below;
endmodule
