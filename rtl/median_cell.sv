// median_cell: one cell c_i of the window.
//
// A cell holds three registers, all clocked on the rising edge:
//   R_i - a sample, loaded from X only while the cell holds the token (enable = T_i);
//   P_i - the sample's rank in the window, loaded every clock from rank_gen's Q_i;
//   T_i - the token, taken every clock from the previous cell of the ring.
// The cells form a ring: the token visits one cell per clock, so the cell it is in holds
// the oldest sample, which is overwritten by the new one (first in, first out) and samples
// never move between cells. A comparator flags the cell whose rank is (N+1)/2, the median.
// Reset (asynchronous, active low) clears R_i and P_i and sets T_i to TOKEN_AT_RESET, which
// the filter sets for the last cell only. The cell's outputs are the register values, so
// the ring's combinational paths run through rank_sel, rank_cal and rank_gen.
module median_cell #(
  parameter int unsigned N              = median_pkg::DEFAULT_N,
  parameter int unsigned WIDTH          = median_pkg::DEFAULT_WIDTH,
  parameter int unsigned PW             = median_pkg::rank_width(N),
  parameter bit          TOKEN_AT_RESET = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] x,          // register X
  input  logic [PW-1:0]    a,          // new rank of the token cell (rank_cal)
  input  logic [PW-1:0]    b,          // rank of the leaving sample (rank_sel)
  input  logic             token_in,   // T of the previous cell in the ring
  output logic [WIDTH-1:0] r,          // R_i
  output logic [PW-1:0]    p,          // P_i
  output logic             t,          // T_i
  output logic             a_flag,     // A_i, to rank_cal
  output logic             is_median   // P_i == (N+1)/2, to median_sel
);
  localparam logic [PW-1:0] MEDIAN_RANK = PW'(median_pkg::median_rank(N));

  logic [PW-1:0] q;

  rank_gen #(.WIDTH(WIDTH), .PW(PW)) u_rank_gen (
    .x(x), .r(r), .p(p), .t(t), .a(a), .b(b), .q(q), .a_flag(a_flag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
      p <= '0;
      t <= TOKEN_AT_RESET;
    end else begin
      if (t) r <= x;
      p <= q;
      t <= token_in;
    end
  end

  assign is_median = (p == MEDIAN_RANK);
endmodule
