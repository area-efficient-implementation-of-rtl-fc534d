// median_stream_ref: reference checker for a running median filter with window N.
//
// It watches the sample stream x that is applied to the filter (sampled at each rising
// clock edge while active is high) and the filter's output y. Once N samples have been
// applied, the output after each edge must equal the median of the N samples that were
// applied up to two edges earlier (input register, then the two pipeline stages). The
// median is found by sorting a copy of the window. It also counts impulse samples (all
// zeros or all ones) at the input and output, to show how many the filter removes.
module median_stream_ref #(
  parameter int N     = 5,
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             active,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output int               checks,
  output int               failures,
  output int               impulses_in,
  output int               impulses_out
);
  logic [WIDTH-1:0] hist [$];

  function automatic logic [WIDTH-1:0] median_of(input int newest);
    logic [WIDTH-1:0] w [N];
    for (int i = 0; i < N; i++) w[i] = hist[newest - i];
    w.sort();
    return w[(N - 1) / 2];
  endfunction

  initial begin
    checks = 0; failures = 0; impulses_in = 0; impulses_out = 0;
  end

  always @(posedge clk) if (active) begin
    hist.push_back(x);
    if (x == '0 || x == '1) impulses_in++;
    #1;
    if (hist.size() >= N + 2) begin
      logic [WIDTH-1:0] want;
      want = median_of(hist.size() - 3);
      checks++;
      if (y == '0 || y == '1) impulses_out++;
      if (y != want) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d W=%0d sample %0d: y=%0d exp %0d",
                                    N, WIDTH, hist.size() - 1, y, want);
      end
    end
  end
endmodule
