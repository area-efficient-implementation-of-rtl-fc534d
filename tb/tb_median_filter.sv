// tb_median_filter: end-to-end test of the running median filter at its default size
// (window 5, 8-bit samples), with no parameter override.
//
// Part 1 replays the nine-sample insertion example (12 59 35 47 66 52 38 18 26) and checks
// every cell's token, sample and rank register and the output register after each clock
// against the expected table, worked out by hand from the ranking rules. Before the first
// sample, the last cell holds the token and X holds 0, so that cell ranks its (zero) sample
// 5 at t1, and the zero sample then moves down one rank per clock until 66 replaces it.
// Part 2 streams random samples (full range, a narrow range that forces equal samples, and
// salt-and-pepper impulses) and checks every output against a sorted copy of the last N
// inputs, two clocks after the newest of them was in X: this checks the two-stage latency
// and the rate of one median per clock. After the window is full it also checks that the
// ranks are a permutation of 1..N and that each rank orders the samples.
// It counts how often each rank update case happens (token cell, -1, +1, the three
// unchanged cases, token wrap) and fails if one never happens.
module tb_median_filter;
  localparam int N     = 5;
  localparam int WIDTH = 8;
  localparam int PW    = 3;
  localparam int RANDOM_SAMPLES = 3000;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [WIDTH-1:0] x_in;
  logic [WIDTH-1:0] y_out;

  int checks = 0;
  int failures = 0;

  median_filter dut (.clk(clk), .rst_n(rst_n), .x_in(x_in), .y_out(y_out));

  always #5 clk = ~clk;

  // Probes into the cells.
  logic [WIDTH-1:0] r_probe [N];
  logic [PW-1:0]    p_probe [N];
  logic [N-1:0]     t_probe;
  logic [WIDTH-1:0] x_probe;
  for (genvar i = 0; i < N; i++) begin : g_probe
    assign r_probe[i] = dut.g_cell[i].u_cell.r;
    assign p_probe[i] = dut.g_cell[i].u_cell.p;
    assign t_probe[i] = dut.g_cell[i].u_cell.t;
  end
  assign x_probe = dut.x_q;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- coverage of the rank update cases, sampled before each clock edge ----
  int n_token = 0, n_dec = 0, n_inc = 0, n_same_below = 0, n_same_above = 0;
  int n_same_equal = 0, n_wrap = 0;

  always @(negedge clk) if (rst_n) begin
    logic [PW-1:0] bq;
    bq = '0;
    for (int i = 0; i < N; i++) if (t_probe[i]) bq = p_probe[i];
    if (t_probe[N-1]) n_wrap++;
    for (int i = 0; i < N; i++) begin
      if (t_probe[i])                                  n_token++;
      else if (p_probe[i] == bq)                       n_same_equal++;
      else if (p_probe[i] > bq && r_probe[i] <= x_probe) n_dec++;
      else if (p_probe[i] < bq && r_probe[i] >  x_probe) n_inc++;
      else if (p_probe[i] < bq)                        n_same_below++;
      else                                             n_same_above++;
    end
  end

  // ---- part 1: the insertion example ----
  typedef struct {
    logic [WIDTH-1:0] x;
    logic [N-1:0]     t;      // t[0] is cell 1
    int               r [N];
    int               p [N];
    int               y;
  } row_t;

  row_t table1 [10];

  initial begin
    table1[0] = '{x:0,  t:5'b10000, r:'{0,0,0,0,0},       p:'{0,0,0,0,0}, y:0};
    table1[1] = '{x:12, t:5'b00001, r:'{0,0,0,0,0},       p:'{0,0,0,0,5}, y:0};
    table1[2] = '{x:59, t:5'b00010, r:'{12,0,0,0,0},      p:'{5,0,0,0,4}, y:0};
    table1[3] = '{x:35, t:5'b00100, r:'{12,59,0,0,0},     p:'{4,5,0,0,3}, y:0};
    table1[4] = '{x:47, t:5'b01000, r:'{12,59,35,0,0},    p:'{3,5,4,0,2}, y:0};
    table1[5] = '{x:66, t:5'b10000, r:'{12,59,35,47,0},   p:'{2,5,3,4,1}, y:12};
    table1[6] = '{x:52, t:5'b00001, r:'{12,59,35,47,66},  p:'{1,4,2,3,5}, y:35};
    table1[7] = '{x:38, t:5'b00010, r:'{52,59,35,47,66},  p:'{3,4,1,2,5}, y:47};
    table1[8] = '{x:18, t:5'b00100, r:'{52,38,35,47,66},  p:'{4,2,1,3,5}, y:52};
    table1[9] = '{x:26, t:5'b01000, r:'{52,38,18,47,66},  p:'{4,2,1,3,5}, y:47};
  end

  task automatic check_row(input int k);
    check(x_probe == table1[k].x, $sformatf("t%0d X=%0d exp %0d", k, x_probe, table1[k].x));
    check(t_probe == table1[k].t, $sformatf("t%0d T=%b exp %b", k, t_probe, table1[k].t));
    for (int i = 0; i < N; i++) begin
      check(r_probe[i] == table1[k].r[i],
            $sformatf("t%0d R%0d=%0d exp %0d", k, i + 1, r_probe[i], table1[k].r[i]));
      check(p_probe[i] == table1[k].p[i],
            $sformatf("t%0d P%0d=%0d exp %0d", k, i + 1, p_probe[i], table1[k].p[i]));
    end
    check(y_out == table1[k].y, $sformatf("t%0d Y=%0d exp %0d", k, y_out, table1[k].y));
  endtask

  // ---- part 2: reference median of the last N inputs ----
  logic [WIDTH-1:0] hist [$];  // every input since the window filled, newest last

  function automatic logic [WIDTH-1:0] ref_median(input int newest);
    logic [WIDTH-1:0] w [N];
    for (int i = 0; i < N; i++) w[i] = hist[newest - i];
    w.sort();
    return w[(N - 1) / 2];
  endfunction

  task automatic check_ranks();
    bit seen [N+1];
    for (int i = 0; i <= N; i++) seen[i] = 0;
    for (int i = 0; i < N; i++) begin
      check(p_probe[i] >= 1 && p_probe[i] <= N && !seen[p_probe[i]],
            $sformatf("rank P%0d=%0d not a fresh rank in 1..%0d", i + 1, p_probe[i], N));
      if (p_probe[i] <= N) seen[p_probe[i]] = 1;
      for (int j = 0; j < N; j++)
        if (p_probe[i] < p_probe[j])
          check(r_probe[i] <= r_probe[j],
                $sformatf("P%0d<P%0d but R%0d=%0d > R%0d=%0d", i + 1, j + 1,
                          i + 1, r_probe[i], j + 1, r_probe[j]));
    end
  endtask

  function automatic logic [WIDTH-1:0] next_sample(input int k);
    int unsigned mode;
    mode = (k / 500) % 3;
    case (mode)
      0:       return WIDTH'($urandom);
      1:       return WIDTH'($urandom_range(0, 3) + 100);       // many equal samples
      default: begin                                           // salt and pepper
        int unsigned u;
        u = $urandom_range(0, 99);
        if (u < 10)      return '0;
        else if (u < 20) return '1;
        else             return WIDTH'(120 + $urandom_range(0, 15));
      end
    endcase
  endfunction

  initial begin
    rst_n = 1'b0;
    x_in  = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 check_row(0);
    for (int k = 1; k <= 9; k++) begin
      x_in = table1[k].x;
      @(posedge clk);
      #1 check_row(k);
    end

    // Part 2: restart from reset, fill with N samples, then stream.
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    hist.delete();
    for (int k = 0; k < RANDOM_SAMPLES; k++) begin
      x_in = next_sample(k);
      hist.push_back(x_in);
      @(posedge clk);
      #1;
      // y_out now shows the window whose newest sample was in X one clock earlier,
      // i.e. the input applied two clocks ago.
      if (k >= N + 1) begin
        check(y_out == ref_median(k - 2),
              $sformatf("sample %0d: y=%0d exp %0d", k, y_out, ref_median(k - 2)));
        check_ranks();
      end
    end

    $display("cases: token=%0d dec=%0d inc=%0d same_below=%0d same_above=%0d same_equal=%0d wrap=%0d",
             n_token, n_dec, n_inc, n_same_below, n_same_above, n_same_equal, n_wrap);
    check(n_token > 0,      "token cell rank never computed");
    check(n_dec > 0,        "case I (decrement) never happened");
    check(n_inc > 0,        "case II (increment) never happened");
    check(n_same_below > 0, "case III never happened");
    check(n_same_above > 0, "case IV never happened");
    check(n_same_equal > 0, "case V never happened");
    check(n_wrap > 0,       "token never wrapped from the last cell to the first");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RANDOM_SAMPLES + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
