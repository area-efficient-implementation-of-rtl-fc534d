// median_filter: one-dimensional running median filter, window of N samples (N odd).
//
// Instead of sorting the window every clock, each sample stays in its own cell and carries
// its rank. A token circulates around the ring of cells and marks the oldest sample. Every
// clock the sample in register X replaces the token cell's sample; the token cell gets rank
// (number of other samples <= X) + 1 from rank_cal, and every other cell corrects its rank
// by -1, +1 or 0 depending on whether its sample is <= X and whether its rank is above or
// below B, the rank of the leaving sample (rank_sel). The cell whose rank is (N+1)/2 holds
// the median, which median_sel passes to the output register Y.
//
// Timing: two pipeline stages after the input register. A sample on x_in at rising edge k
// is in X after edge k, is in its cell with its ranks settled after edge k+1, and the median
// of the window that includes it is on y_out after edge k+2. One median per clock; there is
// no valid or stall signal. While the first N samples fill the window, empty cells count as
// holding 0, and y_out is the sample whose rank is (N+1)/2 if one has that rank yet, else 0.
//
// Reset (asynchronous, active low) clears X, Y, all samples and ranks and gives the token to
// the last cell, so that the first sample goes to the first cell. The reset style is this
// design's choice. Rank increments and decrements, and the rank count, use carry select
// adders built around a Binary to Excess-1 Converter (csla_bec).
module median_filter #(
  parameter int unsigned N     = median_pkg::DEFAULT_N,
  parameter int unsigned WIDTH = median_pkg::DEFAULT_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] x_in,
  output logic [WIDTH-1:0] y_out
);
  localparam int unsigned PW = median_pkg::rank_width(N);

  logic [WIDTH-1:0] x_q;
  logic [WIDTH-1:0] r [N];
  logic [PW-1:0]    p [N];
  logic [N-1:0]     t;
  logic [N-1:0]     a_flags;
  logic [N-1:0]     hit;
  logic [PW-1:0]    a_rank;
  logic [PW-1:0]    b_rank;
  logic [WIDTH-1:0] median;

  initial assert (N % 2 == 1 && N >= 3) else $error("median_filter needs an odd N >= 3");

  // Input register X and output register Y.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      y_out <= '0;
    end else begin
      x_q   <= x_in;
      y_out <= median;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_cell
    median_cell #(
      .N(N), .WIDTH(WIDTH), .PW(PW), .TOKEN_AT_RESET(i == N - 1)
    ) u_cell (
      .clk(clk), .rst_n(rst_n), .x(x_q), .a(a_rank), .b(b_rank),
      .token_in(t[(i + N - 1) % N]),
      .r(r[i]), .p(p[i]), .t(t[i]), .a_flag(a_flags[i]), .is_median(hit[i])
    );
  end

  rank_sel   #(.N(N), .PW(PW))       u_rank_sel   (.p(p), .t(t), .b(b_rank));
  rank_cal   #(.N(N), .PW(PW))       u_rank_cal   (.a_flags(a_flags), .a(a_rank));
  median_sel #(.N(N), .WIDTH(WIDTH)) u_median_sel (.r(r), .hit(hit), .y(median));

  // Exactly one cell holds the token.
  token_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    (t != '0) && ((t & (t - 1'b1)) == '0));
endmodule
