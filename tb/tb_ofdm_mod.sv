// tb_ofdm_mod: zero-padded frames of random QPSK symbols (512 data slots and
// 128 gap slots, one slot per 8 clocks) go into the modulator. Each output
// frame must be 640 samples, 5120 clocks apart: the last 128 samples of the
// inverse DFT (with 1/N) of the frame's symbols, then all 512, in Q6.12,
// each within 6 LSB of a floating-point reference; out.sof on sample 0.
module tb_ofdm_mod;
  import ofdm_pkg::*;
  localparam int N = 512, CP = 128, NFR = 3;
  logic clk = 0, rst = 1, in_v = 0, in_data = 0, slot_stb;
  qpsk_t in_i = 0, in_q = 0;
  cstream_t out;
  ofdm_mod dut (.clk, .rst, .in_v, .in_data, .in_i, .in_q, .slot_stb, .out);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, ofr = 0, opos = 0, last_sof = -1;
  int xr [NFR+2][N], xi [NFR+2][N];
  real er [N], ei [N];
  assign slot_stb = (cyc % 8 == 0);
  task automatic ref_idft(input int f);
    real a;
    for (int n = 0; n < N; n++) begin
      er[n] = 0; ei[n] = 0;
      for (int k = 0; k < N; k++) begin
        a = 2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
        er[n] += xr[f][k] * $cos(a) - xi[f][k] * $sin(a);
        ei[n] += xi[f][k] * $cos(a) + xr[f][k] * $sin(a);
      end
      er[n] = er[n] / N * 4096.0; ei[n] = ei[n] / N * 4096.0;
    end
  endtask
  always @(posedge clk) begin
    cyc <= rst ? 0 : cyc + 1;
    if (!rst && out.v) begin
      int n;
      if (out.sof) begin
        if (opos != 0) begin failures++; $display("FAIL sof position"); end
        if (last_sof >= 0 && cyc - last_sof != 5120) begin failures++; $display("FAIL frame period"); end
        last_sof = cyc;
        if (ofr < NFR) ref_idft(ofr);
      end
      n = (opos < CP) ? N - CP + opos : opos - CP;
      if (ofr < NFR) begin
        checks++;
        if ((real'(out.re) - er[n]) ** 2 > 36.0 || (real'(out.im) - ei[n]) ** 2 > 36.0) begin
          failures++;
          if (failures < 10) $display("FAIL fr %0d n %0d got %0d,%0d exp %f,%f", ofr, n, out.re, out.im, er[n], ei[n]);
        end
      end
      opos++;
      if (opos == N + CP) begin opos = 0; ofr++; end
    end
  end
  initial begin
    for (int f = 0; f < NFR + 2; f++)
      for (int k = 0; k < N; k++) begin
        xr[f][k] = $urandom_range(0, 1) ? 1 : -1;
        xi[f][k] = $urandom_range(0, 1) ? 1 : -1;
      end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < NFR + 2; f++)
      for (int s = 0; s < N + CP; s++) begin
        @(posedge clk);
        while (cyc % 8 != 1) @(posedge clk);
        in_v <= 1; in_data <= (s < N);
        in_i <= (s < N) ? qpsk_t'(xr[f][s]) : '0;
        in_q <= (s < N) ? qpsk_t'(xi[f][s]) : '0;
        @(posedge clk);
        in_v <= 0;
      end
    repeat (6000) @(posedge clk);
    checks++;
    if (ofr < NFR) begin failures++; $display("FAIL only %0d frames", ofr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
