// tb_ofdm_top: end-to-end test of the OFDM link at its full size.
//
// Feeds random bits into the transmitter at the 20 Mbit/s bit strobe and
// checks the bits coming out of the receiver, in order, against those sent.
// Phase 1 runs without noise (es_no = 0): through the fading channel every
// bit must come back. Phase 2 (after a reset) adds moderate noise: the
// link must deliver the right number of bits, with some errors but under a
// quarter wrong. The recovered bits must leave exactly every 5 clocks. Phase 3 adds heavy noise: at least 30 % must be wrong. Along the way the test counts how often each mechanism of the link
// acts: cyclic prefixes sent, zero-padding gap slots, fading-gain changes,
// received frame syncs, prefix slots punctured, divisions and noise samples
// added; each must happen at least once.
module tb_ofdm_top;
  import ofdm_pkg::*;

  localparam int NFRAMES_OK    = 6;   // checked frames in phase 1
  localparam int NFRAMES_NOISY = 3;

  logic clk = 0, rst = 1;
  logic bit_en, bit_in = 0, bit_out, bit_out_valid;
  logic signed [15:0] es_no = 0;
  sample_t if_out, rx_if;

  ofdm_top dut (.clk, .rst, .bit_en, .bit_in, .es_no, .bit_out, .bit_out_valid, .if_out, .rx_if);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit sent [$];
  int nrx, nerr;
  // rate and latency: clocks since reset, first input bit, last output bit
  int cyc, t_in, t_out, n_gap_bad, latency;
  // mechanism counters
  int n_cp = 0, n_gap = 0, n_gain = 0, n_rxsync = 0, n_punct = 0, n_div = 0, n_noise = 0;
  sample_t last_g;

  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      if (bit_en && t_in < 0) t_in = cyc;
      if (bit_out_valid) begin
        if (t_out < 0) latency = cyc - t_in;
        else if (cyc - t_out != 5) n_gap_bad++;
        t_out = cyc;
      end
      if (bit_en) begin
        bit_in <= 1'($urandom_range(0, 1));
      end
      if (bit_en) sent.push_back(bit_in);
      if (bit_out_valid) begin
        if (sent.size() == 0) nerr++;
        else if (sent.pop_front() != bit_out) nerr++;
        nrx++;
      end
      if (dut.tx_bb.v && dut.tx_bb.sof) n_cp++;
      if (dut.zp_v && !dut.zp_data) n_gap++;
      if (dut.ch_re[0] != last_g) begin n_gain++; last_g = dut.ch_re[0]; end
      if (dut.rx_sof) n_rxsync++;
      if (dut.u_punc.in_v && !dut.u_punc.keep && dut.u_punc.started) n_punct++;
      if (dut.u_pnc.u_div.u_div_re.out_v) n_div++;
      if (rx_if != dut.u_awgn.in_q) n_noise++;
    end
  end

  task automatic run(input int nframes, input logic signed [15:0] k);
    rst = 1; es_no = k;
    sent.delete(); nrx = 0; nerr = 0;
    cyc = 0; t_in = -1; t_out = -1; n_gap_bad = 0;
    repeat (4) @(posedge clk);
    rst <= 0;
    // latency is about 6 frames; run until enough bits returned
    while (nrx < nframes * 1024) @(posedge clk);
  endtask

  initial begin
    last_g = '0;
    run(NFRAMES_OK, 16'sd0);
    checks++;
    if (nerr != 0) begin failures++; $display("FAIL noiseless: %0d bit errors of %0d", nerr, nrx); end
    else $display("noiseless: %0d bits, no errors", nrx);
    // output rate: one bit every 5 clocks (20 Mbit/s at 100 MHz) without gaps
    checks++;
    if (n_gap_bad != 0) begin failures++; $display("FAIL %0d output bits off the 5-clock grid", n_gap_bad); end
    $display("latency from first bit in to first bit out: %0d clocks (%0.2f frames)", latency, real'(latency) / 5120.0);
    // 0.01 noise amplitude against a per-component signal rms of 0.044
    // (Eb/N0 about 10 dB, Rayleigh BER about 2.3 %): some errors, mostly
    // in faded frames, but far fewer than guessing
    run(NFRAMES_NOISY, 16'sd41);
    checks++;
    if (nerr == 0 || nerr * 4 > nrx) begin
      failures++; $display("FAIL moderate noise: %0d bit errors of %0d", nerr, nrx);
    end else $display("moderate noise: %0d bit errors of %0d", nerr, nrx);
    // 0.5 noise amplitude: the bits are lost, about half come out wrong
    run(NFRAMES_NOISY, 16'sd2048);
    checks++;
    if (nerr * 10 < nrx * 3) begin
      failures++; $display("FAIL heavy noise: only %0d bit errors of %0d", nerr, nrx);
    end else $display("heavy noise: %0d bit errors of %0d", nerr, nrx);
    $display("mechanisms: cp=%0d gap=%0d gain=%0d rxsync=%0d punct=%0d div=%0d noise=%0d",
             n_cp, n_gap, n_gain, n_rxsync, n_punct, n_div, n_noise);
    checks++; if (n_cp == 0)     begin failures++; $display("FAIL no cyclic prefix"); end
    checks++; if (n_gap == 0)    begin failures++; $display("FAIL no zero-pad gap"); end
    checks++; if (n_gain < 2)    begin failures++; $display("FAIL fading gain never changed"); end
    checks++; if (n_rxsync == 0) begin failures++; $display("FAIL no receiver frame sync"); end
    checks++; if (n_punct == 0)  begin failures++; $display("FAIL nothing punctured"); end
    checks++; if (n_div == 0)    begin failures++; $display("FAIL no division"); end
    checks++; if (n_noise == 0)  begin failures++; $display("FAIL no noise added"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * 5120 * 4) @(posedge clk);
    failures++;
    $display("FAIL watchdog (received %0d bits)", nrx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
