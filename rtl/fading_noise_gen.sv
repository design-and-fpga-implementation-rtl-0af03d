// fading_noise_gen: complex Gaussian source for one fading path.
//
// Two white Gaussian noise generators with different seeds give the real and
// imaginary parts; each is multiplied by 1/sqrt(2) (a constant of 46341/2^16)
// so that the complex output has unit power, and kept as signed 16 bits with
// 11 fraction bits, as in the document. A new value every clock; one
// register after the generators.
module fading_noise_gen
  import ofdm_pkg::round_conv;
#(
  parameter logic [31:0] SEED_RE = 32'h0BAD_5EED,
  parameter logic [31:0] SEED_IM = 32'h7E57_C0DE
) (
  input  logic               clk,
  input  logic               rst,
  output logic signed [15:0] n_re,
  output logic signed [15:0] n_im
);
  localparam logic signed [17:0] INV_SQRT2 = 18'sd46341;  // 0.70711 * 2^16

  logic signed [15:0] w_re, w_im;

  wgn_gen #(.SEED(SEED_RE)) u_re (.clk, .rst, .noise(w_re));
  wgn_gen #(.SEED(SEED_IM)) u_im (.clk, .rst, .noise(w_im));

  always_ff @(posedge clk) begin
    if (rst) begin
      n_re <= '0;
      n_im <= '0;
    end else begin
      n_re <= 16'(round_conv(64'(w_re) * 64'(INV_SQRT2), 16));
      n_im <= 16'(round_conv(64'(w_im) * 64'(INV_SQRT2), 16));
    end
  end
endmodule
