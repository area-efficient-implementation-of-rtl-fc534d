// tb_csla_bec: checks the carry select adder with BEC against a + b for all input pairs at
// widths 3 and 4 (the rank widths of windows 5 and 9) and for random pairs at width 8.
module tb_csla_bec;
  int checks = 0, failures = 0;

  logic [2:0] a3, b3, s3;  logic c3;
  logic [3:0] a4, b4, s4;  logic c4;
  logic [7:0] a8, b8, s8;  logic c8;

  csla_bec #(.W(3)) dut3 (.a(a3), .b(b3), .sum(s3), .cout(c3));
  csla_bec #(.W(4)) dut4 (.a(a4), .b(b4), .sum(s4), .cout(c4));
  csla_bec #(.W(8)) dut8 (.a(a8), .b(b8), .sum(s8), .cout(c8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j); #1;
        check({c3, s3} == 4'(i + j), $sformatf("W=3 %0d+%0d = %0d", i, j, {c3, s3}));
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        check({c4, s4} == 5'(i + j), $sformatf("W=4 %0d+%0d = %0d", i, j, {c4, s4}));
      end
    for (int k = 0; k < 500; k++) begin
      int i, j;
      i = $urandom_range(0, 255); j = $urandom_range(0, 255);
      a8 = 8'(i); b8 = 8'(j); #1;
      check({c8, s8} == 9'(i + j), $sformatf("W=8 %0d+%0d = %0d", i, j, {c8, s8}));
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
