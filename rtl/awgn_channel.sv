// awgn_channel: additive white Gaussian noise channel.
//
// A white Gaussian noise generator (unit variance, 16 bits, 11 fraction bits)
// is multiplied by the es_no input, the noise amplitude factor set from the
// wanted Eb/N0 (signed 16 bits, 12 fraction bits), in a 3-clock multiplier
// whose 18-bit output keeps 12 fraction bits; the scaled noise is added to the
// IF signal in a 2-clock adder. Widths and latencies follow the document
// (16-bit input factor, 18-bit product, 2-clock adder); the fraction
// positions are this design's. es_no = 0 gives a noiseless channel.
// Timing: out is the input of 2 clocks earlier plus noise.
module awgn_channel
  import ofdm_pkg::*;
#(
  parameter logic [31:0] SEED = 32'hA5A5_0F0F
) (
  input  logic               clk,
  input  logic               rst,
  input  sample_t            in,
  input  logic signed [15:0] es_no,
  output sample_t            out
);
  logic signed [15:0] w;
  sample_t            m_q [3];
  sample_t            in_q;

  wgn_gen #(.SEED(SEED)) u_wgn (.clk, .rst, .noise(w));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 3; k++) m_q[k] <= '0;
      in_q <= '0;
      out  <= '0;
    end else begin
      // Q5.11 * Q4.12 = Q.23 -> Q6.12, saturated to 18 bits
      m_q[0] <= sample_t'(sat(round_conv(64'(w) * 64'(es_no), 11), SW));
      m_q[1] <= m_q[0];
      m_q[2] <= m_q[1];
      in_q   <= in;
      out    <= in_q + m_q[2];
    end
  end
endmodule
