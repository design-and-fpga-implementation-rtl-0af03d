// fading_channel: 3-path Rayleigh multipath fading channel.
//
// Three fading_path taps at 0, 1 and 2 sample delays (one sample = 8 clocks
// at 12.5 Msps) with path factors 0.7116, 0.5543 and 0.4317, the square roots
// of the exponential power-delay profile 0.5065, 0.3072, 0.1863 given in the
// document. Each tap has its own pair of Gaussian generators (six in all);
// the products are summed, real and imaginary parts separately, in 18 bits.
// The path gains are brought out for the receiver, which is given the channel
// state (the document's CH I / CH Q). The tap delays of 1 and 2 samples are
// this design's reading of "n_max = 2"; the document does not print them.
// Timing: out.v / out.sof follow in.v / in.sof by LAT+2 clocks; the gains
// of a frame are taken at its first sample (in.sof).
module fading_channel
  import ofdm_pkg::*;
#(
  parameter int unsigned LAT = 3
) (
  input  logic     clk,
  input  logic     rst,
  input  cstream_t in,
  output cstream_t out,
  output sample_t  ch_re [3],
  output sample_t  ch_im [3]
);
  localparam logic signed [17:0] FACT [3] = '{18'sd46635, 18'sd36327, 18'sd28292};
  localparam logic [31:0] SEEDS [6] = '{32'h1F2E_3D4C, 32'h5B6A_7988, 32'h0123_4567,
                                        32'h89AB_CDEF, 32'hDEAD_BEEF, 32'hC0FF_EE11};

  sample_t yr [3];
  sample_t yi [3];
  logic [LAT:0] v_d, sof_d;

  for (genvar p = 0; p < 3; p++) begin : g_path
    fading_path #(.DELAY(p), .FACTOR(FACT[p]), .SEED_RE(SEEDS[2*p]),
                  .SEED_IM(SEEDS[2*p+1]), .LAT(LAT)) u_path (
      .clk, .rst, .in_v(in.v), .in_sof(in.sof), .x_re(in.re), .x_im(in.im),
      .y_re(yr[p]), .y_im(yi[p]), .g_re(ch_re[p]), .g_im(ch_im[p]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v_d   <= '0;
      sof_d <= '0;
      out   <= '0;
    end else begin
      v_d     <= {v_d[LAT-1:0], in.v};
      sof_d   <= {sof_d[LAT-1:0], in.v & in.sof};
      out.v   <= v_d[LAT];
      out.sof <= sof_d[LAT];
      out.re  <= yr[0] + yr[1] + yr[2];
      out.im  <= yi[0] + yi[1] + yi[2];
    end
  end
endmodule
