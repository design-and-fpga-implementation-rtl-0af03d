// iq_upconv: I/Q modulator and digital up-converter.
//
// out = I*cos + Q*sin: the baseband components (Q6.12) are multiplied by the
// 16-bit carrier words (14 fraction bits) in two multipliers with 3 clocks of
// latency, the products are truncated to 18-bit Q6.12 and added in an 18-bit
// adder with one register, wrapping on overflow. Latencies, widths,
// truncation and wrapping follow the document; the adder latency is read from
// the z^-1 printed on the adder in Figure 4-1. Which carrier feeds which
// multiplier is taken from the text (I with cosine, Q with sine).
// Timing: out reflects the inputs of 4 clocks earlier.
module iq_upconv
  import ofdm_pkg::*;
#(
  parameter int unsigned CW = 16,  // carrier width, CW-2 fraction bits
  parameter int unsigned MUL_LAT = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  sample_t              i_in,
  input  sample_t              q_in,
  input  logic signed [CW-1:0] cos_in,
  input  logic signed [CW-1:0] sin_in,
  output sample_t              out
);
  logic signed [SW+CW-1:0] pi_q [MUL_LAT];
  logic signed [SW+CW-1:0] pq_q [MUL_LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < MUL_LAT; k++) begin
        pi_q[k] <= '0;
        pq_q[k] <= '0;
      end
      out <= '0;
    end else begin
      pi_q[0] <= (SW + CW)'(i_in) * (SW + CW)'(cos_in);
      pq_q[0] <= (SW + CW)'(q_in) * (SW + CW)'(sin_in);
      for (int k = 1; k < MUL_LAT; k++) begin
        pi_q[k] <= pi_q[k-1];
        pq_q[k] <= pq_q[k-1];
      end
      // truncate (drop CW-2 fraction bits) and wrap to 18 bits, then add
      out <= sample_t'(pi_q[MUL_LAT-1] >>> (CW - 2)) + sample_t'(pq_q[MUL_LAT-1] >>> (CW - 2));
    end
  end
endmodule
