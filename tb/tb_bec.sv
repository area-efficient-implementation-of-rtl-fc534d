// tb_bec: checks the Binary to Excess-1 Converter. The 3-bit converter is checked against
// its function table (000->001 ... 100->101) and then, like a 5-bit one, against b + 1 for
// every input, wrapping to 0 at the all-ones input.
module tb_bec;
  int checks = 0, failures = 0;

  logic [2:0] b3, x3;
  logic [4:0] b5, x5;

  bec #(.W(3)) dut3 (.b(b3), .x(x3));
  bec #(.W(5)) dut5 (.b(b5), .x(x5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [2:0] tbl_in  [5] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b100};
    logic [2:0] tbl_out [5] = '{3'b001, 3'b010, 3'b011, 3'b100, 3'b101};
    for (int i = 0; i < 5; i++) begin
      b3 = tbl_in[i]; #1;
      check(x3 == tbl_out[i], $sformatf("table: %b -> %b exp %b", b3, x3, tbl_out[i]));
    end
    for (int v = 0; v < 8; v++) begin
      b3 = 3'(v); #1;
      check(x3 == 3'((v + 1) % 8), $sformatf("W=3: %0d -> %0d", v, x3));
    end
    for (int v = 0; v < 32; v++) begin
      b5 = 5'(v); #1;
      check(x5 == 5'((v + 1) % 32), $sformatf("W=5: %0d -> %0d", v, x5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
