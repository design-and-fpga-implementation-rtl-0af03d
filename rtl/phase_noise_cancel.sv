// phase_noise_cancel: channel cancellation with known channel state.
//
// The receiver is given the three path gains of the fading channel. At each
// received frame start the gains are latched and a channel impulse response
// h(t) is laid out over the frame's sample slots: the three gains in the
// first three slots after the 128-slot prefix, zero elsewhere (the document
// builds the same sequence from the gains and zero constants with two time
// division multiplexers). It is loaded into a second forward FFT in exactly
// the slots in which ofdm_demod loads the received symbol, so H(f) leaves its
// FFT in the same clocks as Y(f) leaves the demodulator's. complex_div then
// forms X = Y / H bin by bin. The gains of the first frame after reset that
// carries a frame start are the first used.
// Timing: out_v/out_sof follow y.v/y.sof by 26 clocks (complex_div); out
// samples are 20-bit with 14 fraction bits.
module phase_noise_cancel
  import ofdm_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               rx_v,     // received sample slot (as into ofdm_demod)
  input  logic               rx_sof,   // received frame start (as into ofdm_demod)
  input  sample_t            ch_re [3],
  input  sample_t            ch_im [3],
  input  cstream_t           y,        // ofdm_demod output
  output logic               out_v,
  output logic               out_sof,
  output logic signed [19:0] x_re,
  output logic signed [19:0] x_im
);
  localparam int unsigned OW = SW + LOG2N + 1;

  logic [$clog2(FRAME_LEN)-1:0] slot;
  logic                         started;
  logic                         ld;
  sample_t                      hr, hi;
  sample_t                      g_re [3];
  sample_t                      g_im [3];
  logic                         fv, fsof, fdone;
  logic [LOG2N-1:0]             fidx;
  logic signed [OW-1:0]         fr, fi;
  sample_t                      h_re, h_im;

  // h(t) generator: same slot counting as ofdm_demod
  always_ff @(posedge clk) begin
    if (rst) begin
      slot    <= '0;
      started <= 1'b0;
      ld      <= 1'b0;
      hr      <= '0;
      hi      <= '0;
      for (int p = 0; p < 3; p++) begin
        g_re[p] <= '0;
        g_im[p] <= '0;
      end
    end else begin
      ld <= 1'b0;
      if (rx_v) begin
        if (rx_sof) begin
          started <= 1'b1;
          slot    <= 1;
          for (int p = 0; p < 3; p++) begin
            g_re[p] <= ch_re[p];
            g_im[p] <= ch_im[p];
          end
        end else if (started) begin
          slot <= (slot == $bits(slot)'(FRAME_LEN - 1)) ? '0 : slot + 1'b1;
        end
        ld <= started && !rx_sof && slot >= $bits(slot)'(CP_LEN);
        if (slot >= $bits(slot)'(CP_LEN) && slot < $bits(slot)'(CP_LEN + 3)) begin
          hr <= g_re[2'(slot - $bits(slot)'(CP_LEN))];
          hi <= g_im[2'(slot - $bits(slot)'(CP_LEN))];
        end else begin
          hr <= '0;
          hi <= '0;
        end
      end
    end
  end

  fft_sdf #(.LOG2N(LOG2N), .IW(SW)) u_hfft (
    .clk, .rst, .fwd_inv(1'b1), .cp_len(LOG2N'(CP_LEN)),
    .in_valid(ld), .in_re(hr), .in_im(hi),
    .out_slot(rx_v), .out_valid(fv), .out_sof(fsof), .done(fdone),
    .out_index(fidx), .out_re(fr), .out_im(fi));

  assign h_re = sample_t'(sat(64'(fr), SW));
  assign h_im = sample_t'(sat(64'(fi), SW));

  complex_div #(.QW(20), .QF(14)) u_div (
    .clk, .rst, .in_v(y.v), .in_sof(y.sof), .y_re(y.re), .y_im(y.im),
    .h_re, .h_im, .out_v, .out_sof, .x_re, .x_im);

  logic unused;
  assign unused = fv ^ fsof ^ fdone ^ (^fidx);
endmodule
