// csla_bec: low-area carry select adder that uses a Binary to Excess-1 Converter (BEC)
// in place of the carry-in-1 ripple adder.
//
// Structure (W >= 2):
//   * bit 0 is a half adder; its carry selects the result of the upper part;
//   * bits W-1..1 are a ripple-carry adder (half adder at bit 1, full adders above) that
//     assumes a carry-in of 0, giving {c_hi, s_hi};
//   * a W-bit BEC turns {c_hi, s_hi} into {c_hi, s_hi} + 1, the carry-in-1 result;
//   * a 2W-to-W multiplexer picks one of the two by the carry out of bit 0.
// For W = 3 this is the drawn 3-bit adder (H, H, F, 3-bit BEC, 6:3 mux). The adder has no
// carry input, as in the drawing. Result: {cout, sum} = a + b. Combinational.
module csla_bec #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic         c_lo;           // carry out of bit 0: the select line
  logic [W-1:1] s_hi;           // upper sum, carry-in 0
  logic [W-1:1] c_chain;        // ripple carries of the upper adder
  logic [W-1:0] bec_out;        // {c_hi, s_hi} + 1

  initial assert (W >= 2) else $error("csla_bec needs W >= 2");

  half_adder u_lo (.a(a[0]), .b(b[0]), .sum(sum[0]), .carry(c_lo));

  half_adder u_h1 (.a(a[1]), .b(b[1]), .sum(s_hi[1]), .carry(c_chain[1]));

  for (genvar i = 2; i < W; i++) begin : g_rca
    full_adder u_f (.a(a[i]), .b(b[i]), .cin(c_chain[i-1]), .sum(s_hi[i]), .cout(c_chain[i]));
  end

  bec #(.W(W)) u_bec (.b({c_chain[W-1], s_hi}), .x(bec_out));

  always_comb begin
    if (c_lo) {cout, sum[W-1:1]} = bec_out;
    else      {cout, sum[W-1:1]} = {c_chain[W-1], s_hi};
  end
endmodule
