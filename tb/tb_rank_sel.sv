// tb_rank_sel: puts random ranks on the cells, gives the token to each cell in turn and
// checks that B is the token cell's rank; with no token, B must be 0. Window of 5 and 9.
module tb_rank_sel;
  int checks = 0, failures = 0;

  logic [2:0] p5 [5];  logic [4:0] t5;  logic [2:0] b5;
  logic [3:0] p9 [9];  logic [8:0] t9;  logic [3:0] b9;

  rank_sel #(.N(5), .PW(3)) dut5 (.p(p5), .t(t5), .b(b5));
  rank_sel #(.N(9), .PW(4)) dut9 (.p(p9), .t(t9), .b(b9));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < 5; i++) p5[i] = 3'($urandom_range(0, 5));
      for (int i = 0; i < 9; i++) p9[i] = 4'($urandom_range(0, 9));
      for (int j = 0; j < 9; j++) begin
        t5 = (j < 5) ? 5'(1 << j) : '0;
        t9 = 9'(1 << j);
        #1;
        check(b5 == ((j < 5) ? p5[j] : 3'd0), $sformatf("N=5 token %0d: B=%0d", j, b5));
        check(b9 == p9[j], $sformatf("N=9 token %0d: B=%0d exp %0d", j, b9, p9[j]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
