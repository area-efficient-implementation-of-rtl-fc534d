// tb_median_workloads: runs the four evaluated configurations of the filter, windows of
// 5 and 9 samples at 8-bit and 16-bit sample width, on long streams and checks every
// median against a sorted reference.
//
// The 8-bit streams stand in for image rows: three synthetic rows (a smooth ramp, a
// textured gradient, a fine high-contrast texture) with 10% salt-and-pepper noise. The
// 16-bit streams stand in for audio: three synthetic triangle-wave tones of different
// pitch and amplitude with small noise and 5% impulses. The real images and recordings
// are not used; the stream length per signal is SAMPLES.
module tb_median_workloads;
  localparam int SAMPLES = 4000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        active;
  logic [7:0]  x8;
  logic [15:0] x16;
  logic [7:0]  y8_5, y8_9;
  logic [15:0] y16_5, y16_9;

  median_filter #(.N(5), .WIDTH(8))  dut_8_5  (.clk(clk), .rst_n(rst_n), .x_in(x8),  .y_out(y8_5));
  median_filter #(.N(9), .WIDTH(8))  dut_8_9  (.clk(clk), .rst_n(rst_n), .x_in(x8),  .y_out(y8_9));
  median_filter #(.N(5), .WIDTH(16)) dut_16_5 (.clk(clk), .rst_n(rst_n), .x_in(x16), .y_out(y16_5));
  median_filter #(.N(9), .WIDTH(16)) dut_16_9 (.clk(clk), .rst_n(rst_n), .x_in(x16), .y_out(y16_9));

  int c [4], f [4], ii [4], io [4];

  median_stream_ref #(.N(5), .WIDTH(8))  ref_8_5  (.clk(clk), .active(active), .x(x8),  .y(y8_5),
    .checks(c[0]), .failures(f[0]), .impulses_in(ii[0]), .impulses_out(io[0]));
  median_stream_ref #(.N(9), .WIDTH(8))  ref_8_9  (.clk(clk), .active(active), .x(x8),  .y(y8_9),
    .checks(c[1]), .failures(f[1]), .impulses_in(ii[1]), .impulses_out(io[1]));
  median_stream_ref #(.N(5), .WIDTH(16)) ref_16_5 (.clk(clk), .active(active), .x(x16), .y(y16_5),
    .checks(c[2]), .failures(f[2]), .impulses_in(ii[2]), .impulses_out(io[2]));
  median_stream_ref #(.N(9), .WIDTH(16)) ref_16_9 (.clk(clk), .active(active), .x(x16), .y(y16_9),
    .checks(c[3]), .failures(f[3]), .impulses_in(ii[3]), .impulses_out(io[3]));

  always #5 clk = ~clk;

  function automatic int tri_wave(input int k, input int period, input int amp);
    int ph;
    ph = k % period;
    return (ph < period / 2) ? (ph * 2 * amp) / (period / 2) - amp
                             : amp - ((ph - period / 2) * 2 * amp) / (period / 2);
  endfunction

  function automatic logic [7:0] pixel(input int img, input int k);
    int v;
    case (img)
      0:       v = 40 + (k % 700) / 4;                                 // smooth ramp
      1:       v = 90 + (k % 300) / 3 + $urandom_range(0, 24) - 12;    // textured gradient
      default: v = ((k / 3) % 2 == 0) ? 70 : 170;                      // fine texture
    endcase
    if ($urandom_range(0, 99) < 5)       v = 0;                        // pepper
    else if ($urandom_range(0, 99) < 5)  v = 255;                      // salt
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return 8'(v);
  endfunction

  function automatic logic [15:0] audio(input int trk, input int k);
    int v;
    case (trk)
      0:       v = 32768 + tri_wave(k, 80, 12000);
      1:       v = 32768 + tri_wave(k, 33, 25000);
      default: v = 32768 + tri_wave(k, 200, 6000) + tri_wave(k, 21, 3000);
    endcase
    v += $urandom_range(0, 200) - 100;
    if ($urandom_range(0, 99) < 5) v = ($urandom_range(0, 1) == 1) ? 65535 : 0;
    if (v < 0) v = 0;
    if (v > 65535) v = 65535;
    return 16'(v);
  endfunction

  int checks = 0, failures = 0;

  initial begin
    rst_n = 1'b0; active = 1'b0; x8 = '0; x16 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    active = 1'b1;
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < SAMPLES; k++) begin
        x8  = pixel(s, k);
        x16 = audio(s, k);
        @(negedge clk);
      end
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i]; failures += f[i];
    end
    $display("window 5,  8 bit: %0d medians, impulses in %0d out %0d", c[0], ii[0], io[0]);
    $display("window 9,  8 bit: %0d medians, impulses in %0d out %0d", c[1], ii[1], io[1]);
    $display("window 5, 16 bit: %0d medians, impulses in %0d out %0d", c[2], ii[2], io[2]);
    $display("window 9, 16 bit: %0d medians, impulses in %0d out %0d", c[3], ii[3], io[3]);
    // The filter must remove most impulses.
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (io[i] * 5 > ii[i]) begin
        failures++;
        $display("FAIL configuration %0d left %0d of %0d impulses", i, io[i], ii[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * SAMPLES + 100) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
