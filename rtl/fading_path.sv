// fading_path: one tap of the Rayleigh fading channel.
//
// The complex baseband stream is delayed by DELAY samples (the tap's excess
// delay) and multiplied by a complex gain. The gain is the path's own complex
// Gaussian noise, sampled and held from one frame start (in_sof) to the next,
// so the channel is static over an OFDM symbol and changes from symbol to
// symbol, times the path factor FACTOR (signed, 16 fraction bits). Gains are
// 18-bit Q6.12, and so are the products. The hold-per-symbol, the factor and
// the one noise generator per path are the document's; aligning the gain
// change with the frame start instead of a fixed clock delay is this design's.
// Timing: y is valid LAT+1 clocks after the in_v that carried the sample
// (one register for the delay line and gain, then the complex multiplier).
// g_re/g_im show the gain in use and change one clock after an in_sof sample.
module fading_path
  import ofdm_pkg::*;
#(
  parameter int unsigned DELAY   = 0,
  parameter logic signed [17:0] FACTOR = 18'sd46635,  // 0.7116 * 2^16
  parameter logic [31:0] SEED_RE = 32'h1111_0001,
  parameter logic [31:0] SEED_IM = 32'h2222_0002,
  parameter int unsigned LAT     = 3
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_v,
  input  logic    in_sof,
  input  sample_t x_re,
  input  sample_t x_im,
  output sample_t y_re,
  output sample_t y_im,
  output sample_t g_re,
  output sample_t g_im
);
  logic signed [15:0] n_re, n_im;
  sample_t d_re [DELAY+1];
  sample_t d_im [DELAY+1];

  fading_noise_gen #(.SEED_RE(SEED_RE), .SEED_IM(SEED_IM)) u_noise (.clk, .rst, .n_re, .n_im);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k <= DELAY; k++) begin
        d_re[k] <= '0;
        d_im[k] <= '0;
      end
      g_re <= '0;
      g_im <= '0;
    end else if (in_v) begin
      d_re[0] <= x_re;
      d_im[0] <= x_im;
      for (int k = 1; k <= DELAY; k++) begin
        d_re[k] <= d_re[k-1];
        d_im[k] <= d_im[k-1];
      end
      if (in_sof) begin
        // Q5.11 noise times Q1.16 factor -> Q6.12
        g_re <= sample_t'(round_conv(64'(n_re) * 64'(FACTOR), 15));
        g_im <= sample_t'(round_conv(64'(n_im) * 64'(FACTOR), 15));
      end
    end
  end

  // The delayed sample: for DELAY = 0 the newest, else the oldest of the line.
  // The line shifts on in_v, so entry k holds the sample k loads ago.
  cmul #(.AW(SW), .BW(SW), .PW(SW), .SHIFT(SFRAC), .LAT(LAT)) u_mul (
    .clk, .rst, .conj_b(1'b0),
    .a_re(d_re[DELAY]), .a_im(d_im[DELAY]), .b_re(g_re), .b_im(g_im),
    .p_re(y_re), .p_im(y_im));
endmodule
