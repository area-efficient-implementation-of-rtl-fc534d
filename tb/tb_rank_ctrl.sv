// tb_rank_ctrl: checks the multiplexer select for all input combinations that can occur (P == B
// and P > B exclude each other) against the
// rank update cases: token -> 3 (new rank), P>B and R<=X -> 2 (decrement), P<B and R>X ->
// 1 (increment), everything else, P==B included -> 0 (keep).
module tb_rank_ctrl;
  int checks = 0, failures = 0;
  logic t, e, f, g, s1, s0;

  rank_ctrl dut (.t(t), .e(e), .f(f), .g(g), .s1(s1), .s0(s0));

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] want;
      {t, e, f, g} = 4'(v);
      #1;
      if (!t && e && g) continue;          // P==B and P>B at once cannot occur
      if (t)                 want = 2'd3;
      else if (e)            want = 2'd0;  // case V
      else if (g && f)       want = 2'd2;  // case I
      else if (!g && !f)     want = 2'd1;  // case II
      else                   want = 2'd0;  // cases III, IV
      checks++;
      if ({s1, s0} != want) begin
        failures++;
        $display("FAIL t=%b e=%b f=%b g=%b: sel=%b exp %b", t, e, f, g, {s1, s0}, want);
      end
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
