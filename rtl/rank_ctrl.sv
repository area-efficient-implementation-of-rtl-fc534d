// rank_ctrl: select-line generator ("Ctrl") for the 4:1 rank multiplexer of a cell.
//
// Inputs, per cell i:
//   t  - the cell holds the token (its sample is being replaced this cycle)
//   e  - P_i == B   (B is the rank of the sample leaving the window)
//   f  - R_i <= X   (X is the arriving sample)
//   g  - P_i >  B
// Outputs select the next rank: {s1,s0} = 3 new rank A, 2 P_i-1, 1 P_i+1, 0 P_i.
//   s1 = t | (f & g)          token cell, or case I  (leaving sample was below, new one above)
//   s0 = t | (~e & ~f & ~g)   token cell, or case II (leaving sample was above, new one below)
// Cases III (P_i < B, R_i <= X), IV (P_i > B, R_i > X) and V (P_i == B, a cell not yet
// filled) give 00 and keep the rank. Combinational.
module rank_ctrl (
  input  logic t,
  input  logic e,
  input  logic f,
  input  logic g,
  output logic s1,
  output logic s0
);
  assign s1 = t | (f & g);
  assign s0 = t | (~e & ~f & ~g);
endmodule
