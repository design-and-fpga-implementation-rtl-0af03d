// tb_fading_channel: random samples every 8 clocks, a frame start every 4
// samples, 1000 frames. Each output sample must be the sum over the three
// paths of gain(p) times the sample p loads earlier (each product rounded to
// Q6.12), using the gains the channel reports; the mean power of each path
// gain over all frames must match the exponential profile 0.5065, 0.3072,
// 0.1863 within 15%; out.sof must accompany the first sample of each frame.
module tb_fading_channel;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  cstream_t in, out;
  sample_t ch_re [3], ch_im [3];
  fading_channel dut (.clk, .rst, .in, .out, .ch_re, .ch_im);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  sample_t xr [$], xi [$];
  real pw [3];
  localparam real PDP [3] = '{0.5065, 0.3072, 0.1863};
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  function automatic logic signed [63:0] rnd(input logic signed [63:0] v);
    logic signed [63:0] q, r;
    q = v >>> 12; r = v - (q <<< 12);
    if (r > 2048 || (r == 2048 && q[0])) q++;
    return q;
  endfunction
  initial begin
    in = '0;
    pw = '{0.0, 0.0, 0.0};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      logic signed [63:0] er, ei;
      @(posedge clk);
      in.v <= 1; in.sof <= (n % 4 == 0);
      in.re <= sample_t'($urandom_range(0, 4000)) - 2000;
      in.im <= sample_t'($urandom_range(0, 4000)) - 2000;
      #1;
      xr.push_front(in.re); xi.push_front(in.im);
      @(posedge clk);
      in.v <= 0; in.sof <= 0;
      repeat (4) @(posedge clk);
      #1;
      chk(out.v && out.sof == (n % 4 == 0), "output strobe and frame start");
      if (n % 4 == 0)
        for (int p = 0; p < 3; p++) pw[p] += (real'(ch_re[p]) ** 2 + real'(ch_im[p]) ** 2) / 16777216.0;
      if (n >= 2) begin
        er = 0; ei = 0;
        for (int p = 0; p < 3; p++) begin
          er += rnd(64'(xr[p]) * 64'(ch_re[p]) - 64'(xi[p]) * 64'(ch_im[p]));
          ei += rnd(64'(xr[p]) * 64'(ch_im[p]) + 64'(xi[p]) * 64'(ch_re[p]));
        end
        chk(out.re == sample_t'(er) && out.im == sample_t'(ei), "sum of path products");
      end
      repeat (2) @(posedge clk);
    end
    for (int p = 0; p < 3; p++) begin
      $display("path %0d mean power %f (profile %f)", p, pw[p] / 1000.0, PDP[p]);
      chk(pw[p] / 1000.0 > 0.85 * PDP[p] && pw[p] / 1000.0 < 1.15 * PDP[p], "path power");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
