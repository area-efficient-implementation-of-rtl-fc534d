// tb_rank_cal: checks the new rank (number of set flags + 1) for every flag pattern of a
// window of 5 and of a window of 9 with at most 8 flags set, as happens in the filter.
module tb_rank_cal;
  int checks = 0, failures = 0;

  logic [4:0] f5;  logic [2:0] a5;
  logic [8:0] f9;  logic [3:0] a9;

  rank_cal #(.N(5), .PW(3)) dut5 (.a_flags(f5), .a(a5));
  rank_cal #(.N(9), .PW(4)) dut9 (.a_flags(f9), .a(a9));

  function automatic int ones(input int v);
    int n = 0;
    for (int i = 0; i < 16; i++) n += (v >> i) & 1;
    return n;
  endfunction

  initial begin
    for (int v = 0; v < 32; v++) begin
      f5 = 5'(v); #1;
      checks++;
      if (a5 != 3'(ones(v) + 1)) begin
        failures++; $display("FAIL N=5 flags=%b A=%0d", f5, a5);
      end
    end
    for (int v = 0; v < 512; v++) begin
      if (ones(v) == 9) continue;
      f9 = 9'(v); #1;
      checks++;
      if (a9 != 4'(ones(v) + 1)) begin
        failures++; $display("FAIL N=9 flags=%b A=%0d", f9, a9);
      end
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
