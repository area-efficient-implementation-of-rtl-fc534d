// tb_median_cell: drives one cell of a window of 5 with random arriving samples, new ranks
// A, leaving ranks B and incoming tokens, and checks its registers after every clock
// against a model of the cell: R loads X only with the token, P follows the rank update
// rules, T takes the previous cell's token, and the median flag is P == 3. Two cells are
// used, one that resets with the token and one that does not.
module tb_median_cell;
  localparam int N = 5, WIDTH = 8, PW = 3;
  int checks = 0, failures = 0;

  logic             clk = 1'b0, rst_n;
  logic [WIDTH-1:0] x;
  logic [PW-1:0]    a, b;
  logic             tin;
  logic [WIDTH-1:0] r0, r1;
  logic [PW-1:0]    p0, p1;
  logic             t0, t1, af0, af1, m0, m1;

  median_cell #(.N(N), .WIDTH(WIDTH), .PW(PW), .TOKEN_AT_RESET(1'b0)) dut0 (
    .clk(clk), .rst_n(rst_n), .x(x), .a(a), .b(b), .token_in(tin),
    .r(r0), .p(p0), .t(t0), .a_flag(af0), .is_median(m0));
  median_cell #(.N(N), .WIDTH(WIDTH), .PW(PW), .TOKEN_AT_RESET(1'b1)) dut1 (
    .clk(clk), .rst_n(rst_n), .x(x), .a(a), .b(b), .token_in(tin),
    .r(r1), .p(p1), .t(t1), .a_flag(af1), .is_median(m1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // Model state.
  int mr [2], mp [2];
  bit mt [2];

  function automatic int next_rank(input int rr, input int pp, input bit tt, input int xx,
                                   input int aa, input int bb);
    if (tt)                        return aa;
    if (pp == bb)                  return pp;
    if (pp > bb && rr <= xx)       return pp - 1;
    if (pp < bb && rr >  xx)       return pp + 1;
    return pp;
  endfunction

  task automatic compare(input int k);
    check(r0 == WIDTH'(mr[0]) && p0 == PW'(mp[0]) && t0 == mt[0],
          $sformatf("step %0d cell0 R=%0d P=%0d T=%0d exp %0d %0d %0d",
                    k, r0, p0, t0, mr[0], mp[0], mt[0]));
    check(r1 == WIDTH'(mr[1]) && p1 == PW'(mp[1]) && t1 == mt[1],
          $sformatf("step %0d cell1 R=%0d P=%0d T=%0d exp %0d %0d %0d",
                    k, r1, p1, t1, mr[1], mp[1], mt[1]));
    check(m0 == (mp[0] == 3) && m1 == (mp[1] == 3), $sformatf("step %0d median flag", k));
    check(af0 == (mr[0] <= int'(x) && !mt[0]) && af1 == (mr[1] <= int'(x) && !mt[1]),
          $sformatf("step %0d A flag", k));
  endtask

  initial begin
    rst_n = 1'b0; x = '0; a = '0; b = '0; tin = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    mr = '{0, 0}; mp = '{0, 0}; mt = '{0, 1};
    for (int k = 0; k < 2000; k++) begin
      int nx, na, nb;
      bit ntin;
      nx = $urandom_range(0, 255);
      na = $urandom_range(1, 5);
      nb = $urandom_range(0, 5);
      ntin = ($urandom_range(0, 3) == 0);
      x = WIDTH'(nx); a = PW'(na); b = PW'(nb); tin = ntin;
      #1 compare(k);
      for (int c = 0; c < 2; c++) begin
        mp[c] = next_rank(mr[c], mp[c], mt[c], nx, na, nb) & 7;
        if (mt[c]) mr[c] = nx;
        mt[c] = ntin;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
