// tb_fading_noise_gen: the complex fading noise must have unit power
// (each part with standard deviation 2^11/sqrt(2), about 1448), zero mean
// and uncorrelated real and imaginary parts.
module tb_fading_noise_gen;
  logic clk = 0, rst = 1;
  logic signed [15:0] n_re, n_im;
  fading_noise_gen dut (.clk, .rst, .n_re, .n_im);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real sr, si, qr, qi, x;
  localparam int NS = 40000;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    sr = 0; si = 0; qr = 0; qi = 0; x = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    for (int t = 0; t < NS; t++) begin
      @(negedge clk);
      sr += n_re; si += n_im; qr += real'(n_re) * n_re; qi += real'(n_im) * n_im; x += real'(n_re) * n_im;
    end
    $display("sd re %f im %f power %f corr %f", $sqrt(qr / NS), $sqrt(qi / NS), (qr + qi) / NS / 4194304.0, x / $sqrt(qr * qi));
    chk($sqrt(qr / NS) > 1380 && $sqrt(qr / NS) < 1520, "sigma re");
    chk($sqrt(qi / NS) > 1380 && $sqrt(qi / NS) < 1520, "sigma im");
    chk(sr / NS > -50 && sr / NS < 50 && si / NS > -50 && si / NS < 50, "mean");
    chk(x / $sqrt(qr * qi) > -0.03 && x / $sqrt(qr * qi) < 0.03, "independent parts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
