// half_adder: one-bit half adder, the "H" block of the carry select adder.
// sum = a ^ b, carry = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
