// tb_fading_path: a tap with a 2-sample delay. Random samples arrive every 8
// clocks with a frame start every 5 samples. The output for each sample must
// be the sample of two loads earlier times the gain, rounded to Q6.12; the
// gain must change only at frame starts, and it must equal the path's
// Gaussian noise taken at that frame start times the factor 0.7116.
module tb_fading_path;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1, in_v = 0, in_sof = 0;
  sample_t xr = 0, xi = 0, yr, yi, gr, gi;
  fading_path #(.DELAY(2)) dut (.clk, .rst, .in_v, .in_sof, .x_re(xr), .x_im(xi),
                                .y_re(yr), .y_im(yi), .g_re(gr), .g_im(gi));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nchg = 0;
  sample_t hr [$], hi [$];
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  function automatic sample_t rnd(input logic signed [63:0] v, input int sh);
    logic signed [63:0] q, r;
    q = v >>> sh; r = v - (q <<< sh);
    if (r > (64'sd1 <<< (sh - 1)) || (r == (64'sd1 <<< (sh - 1)) && q[0])) q++;
    return sample_t'(q);
  endfunction
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      sample_t ogr, ogi, a, b, er, ei, egr, egi;
      @(posedge clk);
      in_v <= 1; in_sof <= (n % 5 == 0);
      xr <= sample_t'($urandom_range(0, 4000)) - 2000;
      xi <= sample_t'($urandom_range(0, 4000)) - 2000;
      ogr = gr; ogi = gi;
      #1;
      egr = rnd(64'(dut.n_re) * 64'(18'sd46635), 15);
      egi = rnd(64'(dut.n_im) * 64'(18'sd46635), 15);
      hr.push_back(xr); hi.push_back(xi);
      @(posedge clk);
      in_v <= 0; in_sof <= 0;
      #1;
      if (n % 5 == 0) begin
        chk(gr == egr && gi == egi, "gain = noise x factor");
        if (gr != ogr) nchg++;
      end else begin
        chk(gr == ogr && gi == ogi, "gain held within frame");
      end
      repeat (4) @(posedge clk);
      #1;
      if (hr.size() > 2) begin
        a = hr.pop_front(); b = hi.pop_front();
        er = rnd(64'(a) * 64'(gr) - 64'(b) * 64'(gi), 12);
        ei = rnd(64'(a) * 64'(gi) + 64'(b) * 64'(gr), 12);
        chk(yr == er && yi == ei, "delayed product");
      end
    end
    chk(nchg > 70, "gain changes at frame starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
