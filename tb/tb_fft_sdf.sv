// tb_fft_sdf: self-checking test of the streaming FFT core.
//
// Streams back-to-back frames of random complex samples (N loads in every
// N + CP slots, one slot every other clock) through a 512-point core, first as
// a forward and then (after a reset) as an inverse transform. Every output
// frame is compared with a direct DFT computed here in floating point: the
// cyclic prefix, the natural-order samples and out_index are all checked.
// The extra frame at the end only pushes the last real frame out.
module tb_fft_sdf;
  localparam int LOG2N = 9;
  localparam int N     = 1 << LOG2N;
  localparam int CP    = 128;
  localparam int IW    = 8;
  localparam int OW    = IW + LOG2N + 1;
  localparam int NFR   = 3;    // checked frames per direction
  localparam real TOL  = 40.0; // LSB

  logic clk = 0, rst = 1;
  logic fwd_inv;
  logic in_valid = 0, out_slot = 0;
  logic signed [IW-1:0] in_re = 0, in_im = 0;
  logic out_valid, out_sof, done;
  logic [LOG2N-1:0] out_index;
  logic signed [OW-1:0] out_re, out_im;

  fft_sdf #(.LOG2N(LOG2N), .IW(IW)) dut (
    .clk, .rst, .fwd_inv, .cp_len(LOG2N'(CP)), .in_valid, .in_re, .in_im,
    .out_slot, .out_valid, .out_sof, .done, .out_index, .out_re, .out_im);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NFR+1][N];
  int xi [NFR+1][N];
  real er [N];
  real ei [N];
  int ofr, opos;
  int sof_seen, done_seen;
  bit dir_fwd;

  task automatic ref_dft(input int f, input bit fwd);
    real a, sg;
    sg = fwd ? -1.0 : 1.0;
    for (int k = 0; k < N; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        a = 2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
        er[k] += real'(xr[f][n]) * $cos(a) - sg * real'(xi[f][n]) * $sin(a);
        ei[k] += real'(xi[f][n]) * $cos(a) + sg * real'(xr[f][n]) * $sin(a);
      end
    end
  endtask

  // output checker
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int k;
      if (out_sof) begin
        sof_seen++;
        if (opos != 0) begin failures++; $display("FAIL sof at pos %0d", opos); end
        if (ofr < NFR) ref_dft(ofr, dir_fwd);
      end
      k = (opos < CP) ? N - CP + opos : opos - CP;
      if (ofr < NFR) begin
        checks++;
        if (out_index != LOG2N'(k) ||
            ((real'(out_re) - er[k]) > TOL) || ((er[k] - real'(out_re)) > TOL) ||
            ((real'(out_im) - ei[k]) > TOL) || ((ei[k] - real'(out_im)) > TOL)) begin
          failures++;
          if (failures < 10)
            $display("FAIL fr %0d pos %0d k %0d idx %0d got (%0d,%0d) exp (%f,%f)",
                     ofr, opos, k, out_index, out_re, out_im, er[k], ei[k]);
        end
      end
      if (done) begin
        done_seen++;
        if (opos != CP + N - 1) begin failures++; $display("FAIL done at %0d", opos); end
      end
      opos++;
      if (opos == CP + N) begin opos = 0; ofr++; end
    end
  end

  task automatic run_dir(input bit fwd);
    dir_fwd = fwd;
    fwd_inv = fwd;
    rst = 1; ofr = 0; opos = 0;
    for (int f = 0; f <= NFR; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $signed($urandom_range(0, 200)) - 100;
        xi[f][n] = $signed($urandom_range(0, 200)) - 100;
      end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f <= NFR + 1; f++) begin
      for (int sl = 0; sl < N + CP; sl++) begin
        @(posedge clk);
        out_slot <= 1;
        in_valid <= (sl < N);
        in_re    <= (f <= NFR && sl < N) ? IW'(xr[f][sl]) : '0;
        in_im    <= (f <= NFR && sl < N) ? IW'(xi[f][sl]) : '0;
        @(posedge clk);
        out_slot <= 0;
        in_valid <= 0;
      end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (ofr < NFR) begin failures++; $display("FAIL only %0d frames out (fwd=%0d)", ofr, fwd); end
  endtask

  initial begin
    sof_seen = 0; done_seen = 0;
    run_dir(1'b1);
    run_dir(1'b0);
    checks++;
    if (sof_seen < 2 * NFR || done_seen < 2 * NFR) begin
      failures++; $display("FAIL sof %0d done %0d", sof_seen, done_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
