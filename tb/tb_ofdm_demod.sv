// tb_ofdm_demod: 640-slot received frames of random Q6.12 samples, one slot
// per 8 clocks, frame sync on slot 0. Each output frame must be the DFT of
// slots 128..639 of an input frame, bins 384..511 first (the prefix copy)
// and then bins 0..511, within 24 LSB of a floating-point reference;
// out.sof must mark the first sample.
module tb_ofdm_demod;
  import ofdm_pkg::*;
  localparam int N = 512, CP = 128, NFR = 3;
  logic clk = 0, rst = 1, in_v = 0, in_sof = 0;
  sample_t in_re = 0, in_im = 0;
  cstream_t out;
  ofdm_demod dut (.clk, .rst, .in_v, .in_sof, .in_re, .in_im, .out);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ofr = 0, opos = 0;
  int xr [NFR+2][N+CP], xi [NFR+2][N+CP];
  real er [N], ei [N];
  task automatic ref_dft(input int f);
    real a;
    for (int k = 0; k < N; k++) begin
      er[k] = 0; ei[k] = 0;
      for (int n = 0; n < N; n++) begin
        a = 2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
        er[k] += xr[f][n + CP] * $cos(a) + xi[f][n + CP] * $sin(a);
        ei[k] += xi[f][n + CP] * $cos(a) - xr[f][n + CP] * $sin(a);
      end
      if (er[k] > 131071.0) er[k] = 131071.0;
      if (er[k] < -131072.0) er[k] = -131072.0;
      if (ei[k] > 131071.0) ei[k] = 131071.0;
      if (ei[k] < -131072.0) ei[k] = -131072.0;
    end
  endtask
  always @(posedge clk) begin
    if (!rst && out.v) begin
      int k;
      if (out.sof) begin
        if (opos != 0) begin failures++; $display("FAIL sof position"); end
        if (ofr < NFR) ref_dft(ofr);
      end
      k = (opos < CP) ? N - CP + opos : opos - CP;
      if (ofr < NFR) begin
        checks++;
        if ((real'(out.re) - er[k]) ** 2 > 576.0 || (real'(out.im) - ei[k]) ** 2 > 576.0) begin
          failures++;
          if (failures < 10) $display("FAIL fr %0d k %0d got %0d,%0d exp %f,%f", ofr, k, out.re, out.im, er[k], ei[k]);
        end
      end
      opos++;
      if (opos == N + CP) begin opos = 0; ofr++; end
    end
  end
  initial begin
    for (int f = 0; f < NFR + 2; f++)
      for (int s = 0; s < N + CP; s++) begin
        xr[f][s] = $urandom_range(0, 1200) - 600;
        xi[f][s] = $urandom_range(0, 1200) - 600;
      end
    repeat (3) @(posedge clk);
    rst <= 0;
    // a few slots of garbage before the first frame sync must be ignored
    for (int s = 0; s < 20; s++) begin
      repeat (7) @(posedge clk);
      in_v <= 1; in_re <= 18'($urandom); in_im <= 18'($urandom);
      @(posedge clk);
      in_v <= 0;
    end
    for (int f = 0; f < NFR + 2; f++)
      for (int s = 0; s < N + CP; s++) begin
        repeat (7) @(posedge clk);
        in_v <= 1; in_sof <= (s == 0); in_re <= sample_t'(xr[f][s]); in_im <= sample_t'(xi[f][s]);
        @(posedge clk);
        in_v <= 0; in_sof <= 0;
      end
    repeat (6000) @(posedge clk);
    checks++;
    if (ofr < NFR) begin failures++; $display("FAIL only %0d frames", ofr); end
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
