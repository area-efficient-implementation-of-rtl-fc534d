// tb_median_sel: random samples on 5 cells; the median flag is put on each cell in turn
// and the output must be that cell's sample; with no flag the output must be 0.
module tb_median_sel;
  int checks = 0, failures = 0;

  logic [7:0] r [5];
  logic [4:0] hit;
  logic [7:0] y;

  median_sel #(.N(5), .WIDTH(8)) dut (.r(r), .hit(hit), .y(y));

  initial begin
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < 5; i++) r[i] = 8'($urandom);
      for (int j = 0; j <= 5; j++) begin
        hit = (j < 5) ? 5'(1 << j) : '0;
        #1;
        checks++;
        if (y != ((j < 5) ? r[j] : 8'd0)) begin
          failures++; $display("FAIL hit=%b y=%0d", hit, y);
        end
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
