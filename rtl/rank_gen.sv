// rank_gen: next-rank logic ("RankGen") of one window cell.
//
// Each clock one sample leaves the window (the one in the token cell, rank B) and the new
// sample X takes its place. The cell compares its own sample and rank:
//   F = (R_i <= X),  G = (P_i > B),  E = (P_i == B)
// and A_i = F & ~T_i tells the rank calculator that this cell's sample is not above X.
// rank_ctrl turns T_i, E, F, G into the select of a 4:1 multiplexer:
//   3: A       new rank of the token cell (computed from all A_i by rank_cal)
//   2: P_i - 1 case I
//   1: P_i + 1 case II
//   0: P_i     cases III, IV, V
// The increment and the decrement are carry select adders with a BEC (csla_bec): P_i + 1,
// and P_i + (2^PW - 1), the two's complement of 1. Equal samples rank the newer one above
// the older, so ranks stay distinct. Combinational; Q feeds the cell's rank register.
module rank_gen #(
  parameter int unsigned WIDTH = median_pkg::DEFAULT_WIDTH,
  parameter int unsigned PW    = median_pkg::rank_width(median_pkg::DEFAULT_N)
) (
  input  logic [WIDTH-1:0] x,      // arriving sample (register X)
  input  logic [WIDTH-1:0] r,      // this cell's sample R_i
  input  logic [PW-1:0]    p,      // this cell's rank P_i
  input  logic             t,      // this cell holds the token T_i
  input  logic [PW-1:0]    a,      // new rank for the token cell, from rank_cal
  input  logic [PW-1:0]    b,      // rank of the leaving sample, from rank_sel
  output logic [PW-1:0]    q,      // next rank Q_i
  output logic             a_flag  // A_i: R_i <= X and no token
);
  logic f, g, e, s1, s0;
  logic [PW-1:0] p_inc, p_dec;
  logic          inc_cout, dec_cout;

  assign f      = (r <= x);
  assign g      = (p > b);
  assign e      = (p == b);
  assign a_flag = f & ~t;

  rank_ctrl u_ctrl (.t(t), .e(e), .f(f), .g(g), .s1(s1), .s0(s0));

  csla_bec #(.W(PW)) u_inc (.a(p), .b(PW'(1)),  .sum(p_inc), .cout(inc_cout));
  csla_bec #(.W(PW)) u_dec (.a(p), .b({PW{1'b1}}), .sum(p_dec), .cout(dec_cout));

  always_comb begin
    unique case ({s1, s0})
      2'b11:   q = a;
      2'b10:   q = p_dec;
      2'b01:   q = p_inc;
      default: q = p;
    endcase
  end

  // The carries only matter past the rank range; they are not used.
  logic unused_carries;
  assign unused_carries = inc_cout ^ dec_cout;
endmodule
