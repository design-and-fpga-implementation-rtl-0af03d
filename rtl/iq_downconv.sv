// iq_downconv: I/Q demodulator and down-converter.
//
// The received IF signal is multiplied by the receiver's own carrier, cosine
// for the in-phase and sine for the quadrature branch, after the carrier has
// been delayed by CAR_DLY clocks (0 to 3) to match the phase of the incoming
// signal. The products (3-clock multipliers, truncated to 18-bit Q6.12) are
// down-sampled by 8 to 12.5 Msps: take_i and take_q mark the clock at which
// each branch is sampled and held until the next sample. With the 25 MHz
// carrier at 100 MHz, cos and sin are 0/+1/-1, so at the right clock each
// product is exactly the baseband component. The structure, the 0-3 delay
// and the factor 8 follow the document; the two separate sampling instants
// are this design's way to pick, for each branch, the clock where its carrier
// is nonzero.
// Timing: i_out/q_out change on the clock after take_i/take_q; out_v pulses
// on the clock after take_q.
module iq_downconv
  import ofdm_pkg::*;
#(
  parameter int unsigned CW      = 16,
  parameter int unsigned CAR_DLY = 2,
  parameter int unsigned MUL_LAT = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  sample_t              in,
  input  logic signed [CW-1:0] cos_in,
  input  logic signed [CW-1:0] sin_in,
  input  logic                 take_i,
  input  logic                 take_q,
  output sample_t              i_out,
  output sample_t              q_out,
  output logic                 out_v
);
  logic signed [CW-1:0]    cos_d [CAR_DLY+1];
  logic signed [CW-1:0]    sin_d [CAR_DLY+1];
  logic signed [SW+CW-1:0] pi_q [MUL_LAT];
  logic signed [SW+CW-1:0] pq_q [MUL_LAT];

  assign cos_d[0] = cos_in;
  assign sin_d[0] = sin_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k <= CAR_DLY; k++) begin
        cos_d[k] <= '0;
        sin_d[k] <= '0;
      end
      for (int k = 0; k < MUL_LAT; k++) begin
        pi_q[k] <= '0;
        pq_q[k] <= '0;
      end
      i_out <= '0;
      q_out <= '0;
      out_v <= 1'b0;
    end else begin
      for (int k = 1; k <= CAR_DLY; k++) begin
        cos_d[k] <= cos_d[k-1];
        sin_d[k] <= sin_d[k-1];
      end
      pi_q[0] <= (SW + CW)'(in) * (SW + CW)'(cos_d[CAR_DLY]);
      pq_q[0] <= (SW + CW)'(in) * (SW + CW)'(sin_d[CAR_DLY]);
      for (int k = 1; k < MUL_LAT; k++) begin
        pi_q[k] <= pi_q[k-1];
        pq_q[k] <= pq_q[k-1];
      end
      if (take_i) i_out <= sample_t'(pi_q[MUL_LAT-1] >>> (CW - 2));
      if (take_q) q_out <= sample_t'(pq_q[MUL_LAT-1] >>> (CW - 2));
      out_v <= take_q;
    end
  end
endmodule
