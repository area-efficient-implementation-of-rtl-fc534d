// rank_sel: puts the rank of the token cell on bus B ("RankSel").
//
// B = OR over i of (P_i AND T_i), the AND-OR form of a one-hot multiplexer. Exactly one
// cell holds the token, so B is the rank of the sample that leaves the window this cycle
// (0 while that cell has not yet been filled). Combinational.
module rank_sel #(
  parameter int unsigned N  = median_pkg::DEFAULT_N,
  parameter int unsigned PW = median_pkg::rank_width(N)
) (
  input  logic [PW-1:0] p [N],  // ranks P_1..P_N
  input  logic [N-1:0]  t,      // tokens T_1..T_N (one-hot)
  output logic [PW-1:0] b
);
  always_comb begin
    b = '0;
    for (int i = 0; i < N; i++) b |= p[i] & {PW{t[i]}};
  end
endmodule
