// complex_div: complex divider X = Y / H.
//
// Y / H = Y * conj(H) / |H|^2. A complex multiplier forms Y * conj(H) (the
// document inverts the imaginary part of H in front of the multiplier), two
// real multipliers and an adder form |H|^2 = Hre^2 + Him^2, and two CORDIC
// dividers divide the real and the imaginary part of the product by |H|^2.
// Inputs are 18-bit Q6.12; products keep all 24 fraction bits (37 bits), the
// quotients are 20-bit with 14 fraction bits as in the document. Both product
// paths take 6 clocks (multiplier 3 + adder 3 for |H|^2, as printed in the
// document's figure; the complex multiplier is given the same 6 so that the
// two meet). A channel bin of zero gives a saturated quotient.
// Timing: out_v/out_sof follow in_v/in_sof by 6 + 20 clocks.
module complex_div
  import ofdm_pkg::*;
#(
  parameter int unsigned QW = 20,
  parameter int unsigned QF = 14
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_v,
  input  logic                 in_sof,
  input  sample_t              y_re,
  input  sample_t              y_im,
  input  sample_t              h_re,
  input  sample_t              h_im,
  output logic                 out_v,
  output logic                 out_sof,
  output logic signed [QW-1:0] x_re,
  output logic signed [QW-1:0] x_im
);
  localparam int unsigned PW  = 2 * SW + 1;  // 37
  localparam int unsigned LAT = 6;

  logic signed [PW-1:0] pr, pi;
  logic signed [PW-1:0] hh2 [3];
  logic signed [PW-1:0] sq_re [3];
  logic signed [PW-1:0] sq_im [3];
  logic signed [PW-1:0] mag2;
  logic [LAT-1:0]       v_d, sof_d;
  logic [QW+1:0]        sof_q;
  logic                 v_i, v_q;

  cmul #(.AW(SW), .BW(SW), .PW(PW), .SHIFT(0), .LAT(LAT)) u_cm (
    .clk, .rst, .conj_b(1'b1), .a_re(y_re), .a_im(y_im), .b_re(h_re), .b_im(h_im),
    .p_re(pr), .p_im(pi));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 3; k++) begin
        sq_re[k] <= '0;
        sq_im[k] <= '0;
        hh2[k]   <= '0;
      end
      v_d   <= '0;
      sof_d <= '0;
    end else begin
      sq_re[0] <= PW'(h_re) * PW'(h_re);
      sq_im[0] <= PW'(h_im) * PW'(h_im);
      for (int k = 1; k < 3; k++) begin
        sq_re[k] <= sq_re[k-1];
        sq_im[k] <= sq_im[k-1];
      end
      hh2[0] <= sq_re[2] + sq_im[2];
      hh2[1] <= hh2[0];
      hh2[2] <= hh2[1];
      v_d    <= {v_d[LAT-2:0], in_v};
      sof_d  <= {sof_d[LAT-2:0], in_v & in_sof};
    end
  end

  assign mag2 = hh2[2];

  cordic_div #(.DW(PW), .QW(QW), .QF(QF)) u_div_re (
    .clk, .rst, .in_v(v_d[LAT-1]), .y(pr), .x(mag2), .out_v(v_i), .q(x_re));
  cordic_div #(.DW(PW), .QW(QW), .QF(QF)) u_div_im (
    .clk, .rst, .in_v(v_d[LAT-1]), .y(pi), .x(mag2), .out_v(v_q), .q(x_im));

  // frame-start flag carried through the divider latency
  always_ff @(posedge clk) begin
    if (rst) sof_q <= '0;
    else     sof_q <= {sof_q[QW:0], sof_d[LAT-1]};
  end

  assign out_v   = v_i;
  assign out_sof = sof_q[QW-1] & v_i;

  logic unused;
  assign unused = v_q ^ sof_q[QW+1] ^ sof_q[QW];
endmodule
