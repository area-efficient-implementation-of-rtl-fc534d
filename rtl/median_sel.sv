// median_sel: picks the median sample ("MedianSel").
//
// Each cell flags hit_i when its rank equals (N+1)/2. The median is the sample R_i of the
// flagged cell: y = OR over i of (R_i AND hit_i). Once the window is full exactly one cell
// is flagged; while it fills, none may be, and y is then 0. Combinational; the filter
// registers y in its output register Y.
module median_sel #(
  parameter int unsigned N     = median_pkg::DEFAULT_N,
  parameter int unsigned WIDTH = median_pkg::DEFAULT_WIDTH
) (
  input  logic [WIDTH-1:0] r [N],  // samples R_1..R_N
  input  logic [N-1:0]     hit,    // cell i has the median rank
  output logic [WIDTH-1:0] y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++) y |= r[i] & {WIDTH{hit[i]}};
  end
endmodule
