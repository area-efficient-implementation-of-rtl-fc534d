// tb_rank_gen: checks a cell's next rank and its A flag for every combination of 3-bit
// sample, arriving sample, rank, token, new rank A and leaving rank B, against the rank
// update rules written out directly.
module tb_rank_gen;
  localparam int WIDTH = 3;
  localparam int PW    = 3;
  int checks = 0, failures = 0;

  logic [WIDTH-1:0] x, r;
  logic [PW-1:0]    p, a, b, q;
  logic             t, a_flag;

  rank_gen #(.WIDTH(WIDTH), .PW(PW)) dut (
    .x(x), .r(r), .p(p), .t(t), .a(a), .b(b), .q(q), .a_flag(a_flag)
  );

  initial begin
    for (int vx = 0; vx < 8; vx++)
    for (int vr = 0; vr < 8; vr++)
    for (int vp = 0; vp < 8; vp++)
    for (int vt = 0; vt < 2; vt++)
    for (int va = 0; va < 8; va += 3)
    for (int vb = 0; vb < 8; vb++) begin
      int want_q;
      bit want_a;
      x = WIDTH'(vx); r = WIDTH'(vr); p = PW'(vp); t = vt[0]; a = PW'(va); b = PW'(vb);
      #1;
      if (vt == 1)                      want_q = va;
      else if (vp == vb)                want_q = vp;
      else if (vp > vb && vr <= vx)     want_q = (vp + 7) % 8;
      else if (vp < vb && vr >  vx)     want_q = (vp + 1) % 8;
      else                              want_q = vp;
      want_a = (vr <= vx) && (vt == 0);
      checks++;
      if (q != PW'(want_q) || a_flag != want_a) begin
        failures++;
        if (failures < 20)
          $display("FAIL x=%0d r=%0d p=%0d t=%0d a=%0d b=%0d: q=%0d A=%0d exp %0d %0d",
                   vx, vr, vp, vt, va, vb, q, a_flag, want_q, want_a);
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
