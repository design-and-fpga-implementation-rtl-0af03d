// tb_phase_noise_cancel: random QPSK frames go through a 512-point inverse
// DFT (with 1/N), a 128-sample cyclic prefix and a known three-path channel
// with fresh random complex gains each frame. The received frames go through
// ofdm_demod and then phase_noise_cancel, which is given the gains. Every
// output bin must come back as the transmitted symbol times 2^14: the sign
// must match and, where the channel response is not in a deep fade, the
// value must be within 10 % of 2^14. out_sof must mark the first sample and
// prefix samples must repeat bins 384..511.
module tb_phase_noise_cancel;
  import ofdm_pkg::*;
  localparam int N = 512, CP = 128, NFR = 4;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, rx_v = 0, rx_sof = 0;
  sample_t rx_re = 0, rx_im = 0;
  sample_t ch_re [3], ch_im [3];
  cstream_t y;
  logic out_v, out_sof;
  logic signed [19:0] x_re, x_im;
  ofdm_demod u_dem (.clk, .rst, .in_v(rx_v), .in_sof(rx_sof), .in_re(rx_re), .in_im(rx_im), .out(y));
  phase_noise_cancel dut (.clk, .rst, .rx_v, .rx_sof, .ch_re, .ch_im, .y, .out_v, .out_sof, .x_re, .x_im);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ofr = 0, opos = 0, deep = 0;
  int xr [NFR+2][N], xi [NFR+2][N];
  int gr [NFR+2][3], gi [NFR+2][3];
  int yr [NFR+2][N], yi [NFR+2][N];
  real hmag [NFR+2][N];

  task automatic build(input int f);
    real tr [N], ti [N], a, sr, si;
    for (int n = 0; n < N; n++) begin
      sr = 0; si = 0;
      for (int k = 0; k < N; k++) begin
        a = 2.0 * PI * real'((n * k) % N) / real'(N);
        sr += xr[f][k] * $cos(a) - xi[f][k] * $sin(a);
        si += xi[f][k] * $cos(a) + xr[f][k] * $sin(a);
      end
      tr[n] = $floor(sr / N * 4096.0 + 0.5); ti[n] = $floor(si / N * 4096.0 + 0.5);
    end
    for (int n = 0; n < N; n++) begin
      sr = 0; si = 0;
      for (int p = 0; p < 3; p++) begin
        sr += (gr[f][p] * tr[(n - p + N) % N] - gi[f][p] * ti[(n - p + N) % N]) / 4096.0;
        si += (gr[f][p] * ti[(n - p + N) % N] + gi[f][p] * tr[(n - p + N) % N]) / 4096.0;
      end
      yr[f][n] = int'($floor(sr + 0.5)); yi[f][n] = int'($floor(si + 0.5));
    end
    for (int k = 0; k < N; k++) begin
      sr = 0; si = 0;
      for (int p = 0; p < 3; p++) begin
        a = 2.0 * PI * real'((k * p) % N) / real'(N);
        sr += (gr[f][p] * $cos(a) + gi[f][p] * $sin(a)) / 4096.0;
        si += (gi[f][p] * $cos(a) - gr[f][p] * $sin(a)) / 4096.0;
      end
      hmag[f][k] = $sqrt(sr * sr + si * si);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && out_v) begin
      int k;
      if (out_sof && opos != 0) begin failures++; $display("FAIL sof position"); end
      k = (opos < CP) ? N - CP + opos : opos - CP;
      if (ofr < NFR) begin
        checks++;
        if ((x_re < 0) != (xr[ofr][k] < 0) || (x_im < 0) != (xi[ofr][k] < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL sign fr %0d k %0d got %0d,%0d", ofr, k, x_re, x_im);
        end else if (hmag[ofr][k] > 0.15) begin
          checks++;
          if ((real'(x_re) - 16384.0 * xr[ofr][k]) ** 2 > 1638.4 ** 2 ||
              (real'(x_im) - 16384.0 * xi[ofr][k]) ** 2 > 1638.4 ** 2) begin
            failures++;
            if (failures < 10) $display("FAIL value fr %0d k %0d got %0d,%0d |H| %f", ofr, k, x_re, x_im, hmag[ofr][k]);
          end
        end else deep++;
      end
      opos++;
      if (opos == N + CP) begin opos = 0; ofr++; end
    end
  end

  initial begin
    for (int p = 0; p < 3; p++) begin ch_re[p] = '0; ch_im[p] = '0; end
    for (int f = 0; f < NFR + 2; f++) begin
      for (int k = 0; k < N; k++) begin
        xr[f][k] = $urandom_range(0, 1) ? 1 : -1;
        xi[f][k] = $urandom_range(0, 1) ? 1 : -1;
      end
      gr[f][0] = $urandom_range(1600, 3200) * ($urandom_range(0, 1) ? 1 : -1);
      gi[f][0] = $urandom_range(0, 1200) - 600;
      for (int p = 1; p < 3; p++) begin
        gr[f][p] = $urandom_range(0, 1600) - 800;
        gi[f][p] = $urandom_range(0, 1600) - 800;
      end
      build(f);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < NFR + 2; f++)
      for (int s = 0; s < N + CP; s++) begin
        int n;
        n = (s < CP) ? N - CP + s : s - CP;
        repeat (7) @(posedge clk);
        rx_v <= 1; rx_sof <= (s == 0);
        rx_re <= sample_t'(yr[f][n]); rx_im <= sample_t'(yi[f][n]);
        if (s == 0)
          for (int p = 0; p < 3; p++) begin
            ch_re[p] <= sample_t'(gr[f][p]); ch_im[p] <= sample_t'(gi[f][p]);
          end
        @(posedge clk);
        rx_v <= 0; rx_sof <= 0;
      end
    repeat (6000) @(posedge clk);
    checks++;
    if (ofr < NFR) begin failures++; $display("FAIL only %0d frames", ofr); end
    $display("deep-fade bins (sign only): %0d", deep);
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
