// tb_ofdm_ber: bit error rate of the complete link against Eb/N0 over the
// 3-path Rayleigh fading channel, compared with the theoretical BER of QPSK
// with ideal coherent detection over Rayleigh flat fading,
//   Pb = (1 - sqrt(g / (1 + g))) / 2,  g = Eb/N0 (linear).
// Every subcarrier sees flat fading with E|H|^2 = 1 (the path powers sum to
// one), so the theory applies per subcarrier.
//
// Noise scaling: a transmitted sample has E|x|^2 = 2/512 and each receive
// branch takes one IF sample per slot with noise variance es_no^2; after the
// 512-point FFT a symbol (|X|^2 = 2) sees noise of variance 1024*es_no^2,
// so Eb/N0 = 1 / (1024 * es_no^2), i.e. es_no = 128 / sqrt(Eb/N0) in Q4.12.
//
// At each of four points (0, 5, 10, 15 dB) the link is reset and run for
// NFR frames (1024 bits each). Because the channel changes only once per
// frame, a run of NFR frames sees only about NFR independent fades, and since every
// point restarts the channel generators, all points see the same fades. So
// the test also works out the BER expected for the fades actually drawn:
// for each received frame it takes the path gains the receiver uses, forms
// |H(k)|^2 for all 512 subcarriers and averages Q(sqrt(2 g |H(k)|^2)), the
// BER of one QPSK bit at that subcarrier's SNR. The measured BER must be
// within 10 % of that conditional value, within 25 % of the
// Rayleigh average, and it must fall as Eb/N0 rises.
module tb_ofdm_ber;
  import ofdm_pkg::*;
  localparam int NFR = 400;
  localparam int NPT = 4;
  localparam logic signed [15:0] ES_NO [NPT] = '{16'sd128, 16'sd72, 16'sd40, 16'sd23};

  logic clk = 0, rst = 1;
  logic bit_en, bit_in = 0, bit_out, bit_out_valid;
  logic signed [15:0] es_no = 0;
  sample_t if_out, rx_if;

  ofdm_top dut (.clk, .rst, .bit_en, .bit_in, .es_no, .bit_out, .bit_out_valid, .if_out, .rx_if);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit sent [$];
  int nrx, nerr;
  real ber [NPT];
  real h2 [$];   // |H(k)|^2 of every subcarrier of every received frame
  localparam real PI = 3.14159265358979323846;

  // Gaussian tail probability Q(x) = erfc(x / sqrt 2) / 2 (rational
  // approximation of erfc, absolute error below 1.5e-7)
  function automatic real qfunc(input real x);
    real z, t, e;
    z = x / $sqrt(2.0);
    t = 1.0 / (1.0 + 0.3275911 * z);
    e = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 +
        t * (-1.453152027 + t * 1.061405429)))) * $exp(-z * z);
    return 0.5 * e;
  endfunction

  // gains are latched by the receiver at its frame start; read them 2 clocks on
  logic [1:0] sof_d = '0;
  always @(posedge clk) begin
    sof_d <= {sof_d[0], dut.rx_sof & ~rst};
    if (sof_d[1]) begin
      for (int k = 0; k < 512; k++) begin
        real hr, hi, a;
        hr = 0; hi = 0;
        for (int p = 0; p < 3; p++) begin
          a = 2.0 * PI * real'((k * p) % 512) / 512.0;
          hr += (real'(dut.u_pnc.g_re[p]) * $cos(a) + real'(dut.u_pnc.g_im[p]) * $sin(a)) / 4096.0;
          hi += (real'(dut.u_pnc.g_im[p]) * $cos(a) - real'(dut.u_pnc.g_re[p]) * $sin(a)) / 4096.0;
        end
        h2.push_back(hr * hr + hi * hi);
      end
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (bit_en) bit_in <= 1'($urandom_range(0, 1));
      if (bit_en) sent.push_back(bit_in);
      if (bit_out_valid) begin
        if (sent.size() == 0) nerr++;
        else if (sent.pop_front() != bit_out) nerr++;
        nrx++;
      end
    end
  end

  initial begin
    for (int p = 0; p < NPT; p++) begin
      real g, th, cond, pw;
      rst = 1; es_no = ES_NO[p];
      sent.delete(); nrx = 0; nerr = 0; h2.delete();
      repeat (4) @(posedge clk);
      rst <= 0;
      while (nrx < NFR * 1024) @(posedge clk);
      g = (128.0 / real'(ES_NO[p])) ** 2;
      th = 0.5 * (1.0 - $sqrt(g / (1.0 + g)));
      ber[p] = real'(nerr) / real'(nrx);
      cond = 0; pw = 0;
      foreach (h2[i]) begin cond += qfunc($sqrt(2.0 * g * h2[i])); pw += h2[i]; end
      cond = cond / h2.size(); pw = pw / h2.size();
      $display("Eb/N0 %5.2f dB (es_no %0d): %0d errors in %0d bits, BER %e; for the drawn fades %e (mean |H|^2 %f over %0d frames); Rayleigh average %e",
               10.0 * $log10(g), ES_NO[p], nerr, nrx, ber[p], cond, pw, h2.size() / 512, th);
      checks++;
      if (ber[p] > 1.1 * cond || ber[p] < 0.9 * cond) begin
        failures++; $display("FAIL BER not within 10 %% of the value for the drawn fades");
      end
      checks++;
      if (ber[p] > 1.25 * th || ber[p] < 0.8 * th) begin
        failures++; $display("FAIL BER more than 25 %% away from the Rayleigh average");
      end
      if (p > 0) begin
        checks++;
        if (ber[p] >= ber[p-1]) begin failures++; $display("FAIL BER did not fall"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPT * (NFR + 6) * 5120 + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
