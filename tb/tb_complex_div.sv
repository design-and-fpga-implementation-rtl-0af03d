// tb_complex_div: random Y and H (with |H| kept away from zero) every clock;
// each output must be Y/H computed here in floating point, within 2 LSB of
// the 14-fraction-bit quotient, 26 clocks after the inputs, and the frame
// start flag must travel with its sample.
module tb_complex_div;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1, in_v = 0, in_sof = 0, out_v, out_sof;
  sample_t yr = 0, yi = 0, hr = 4096, hi = 0;
  logic signed [19:0] xr, xi;
  complex_div dut (.clk, .rst, .in_v, .in_sof, .y_re(yr), .y_im(yi), .h_re(hr), .h_im(hi),
                   .out_v, .out_sof, .x_re(xr), .x_im(xi));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  real er [$], ei [$];
  int tq [$];
  bit sq [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_v) begin
      real a, b; int t0; bit s0;
      a = er.pop_front(); b = ei.pop_front(); t0 = tq.pop_front(); s0 = sq.pop_front();
      checks++;
      if (real'(xr) - a > 2.0 || a - real'(xr) > 2.0 || real'(xi) - b > 2.0 || b - real'(xi) > 2.0 ||
          cyc - t0 != 27 || out_sof != s0) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d,%0d exp %f,%f lat %0d", xr, xi, a, b, cyc - t0);
      end
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 800; t++) begin
      sample_t a, b, c, d;
      real m;
      @(posedge clk);
      a = sample_t'($urandom_range(0, 16000)) - 8000;
      b = sample_t'($urandom_range(0, 16000)) - 8000;
      do begin
        c = sample_t'($urandom_range(0, 16000)) - 8000;
        d = sample_t'($urandom_range(0, 16000)) - 8000;
      end while (c * c + d * d < 1000000);
      in_v <= 1; in_sof <= (t % 16 == 0); yr <= a; yi <= b; hr <= c; hi <= d;
      m = real'(c) * c + real'(d) * d;
      er.push_back((real'(a) * c + real'(b) * d) / m * 16384.0);
      ei.push_back((real'(b) * c - real'(a) * d) / m * 16384.0);
      tq.push_back(cyc); sq.push_back(t % 16 == 0);
    end
    @(posedge clk);
    in_v <= 0;
    repeat (40) @(posedge clk);
    checks++;
    if (er.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
