// rank_cal: new rank of the arriving sample ("RankCal").
//
// A = K + 1, where K is the number of A_i flags set, i.e. the cells without the token
// whose sample is less than or equal to the arriving sample X. Cells not yet filled hold
// sample 0 and count as smaller, so the first samples enter at the top ranks and move down
// as the window fills. The count is accumulated by a chain of N carry select adders
// (csla_bec), starting from 1 and adding one flag each. In the filter at most N-1 flags
// are set, so A never exceeds N and fits PW bits. Combinational.
module rank_cal #(
  parameter int unsigned N  = median_pkg::DEFAULT_N,
  parameter int unsigned PW = median_pkg::rank_width(N)
) (
  input  logic [N-1:0]  a_flags,  // A_1..A_N
  output logic [PW-1:0] a         // new rank of the token cell
);
  logic [PW-1:0] acc   [N+1];
  logic [N-1:0]  carry;

  assign acc[0] = PW'(1);

  for (genvar i = 0; i < N; i++) begin : g_acc
    csla_bec #(.W(PW)) u_add (
      .a(acc[i]), .b(PW'(a_flags[i])), .sum(acc[i+1]), .cout(carry[i])
    );
  end

  assign a = acc[N];

  // The carry out is only set for counts beyond the rank range.
  logic unused_carry;
  assign unused_carry = |carry;
endmodule
