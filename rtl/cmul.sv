// cmul: pipelined complex multiplier.
//
// p = a * b, or a * conj(b) when conj_b is set, computed with four real
// products and an add/subtract, then shifted right by SHIFT with convergent
// rounding and cut to PW bits (wrapping). It plays the part of the complex
// multiplier core of the document, which gives its function but not its
// insides; latency LAT (>= 1) clocks, all of it as a register chain after the
// arithmetic.
module cmul
  import ofdm_pkg::round_conv;
#(
  parameter int unsigned AW    = 18,
  parameter int unsigned BW    = 18,
  parameter int unsigned PW    = 18,
  parameter int unsigned SHIFT = 12,
  parameter int unsigned LAT   = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 conj_b,
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  input  logic signed [BW-1:0] b_re,
  input  logic signed [BW-1:0] b_im,
  output logic signed [PW-1:0] p_re,
  output logic signed [PW-1:0] p_im
);
  localparam int unsigned FW = AW + BW + 1;

  logic signed [BW:0]   bi;
  logic signed [FW-1:0] fr, fi;
  logic signed [PW-1:0] q_re [LAT];
  logic signed [PW-1:0] q_im [LAT];

  always_comb begin
    bi = conj_b ? -(BW + 1)'(b_im) : (BW + 1)'(b_im);
    fr = FW'(a_re) * FW'(b_re) - FW'(a_im) * FW'(bi);
    fi = FW'(a_re) * FW'(bi) + FW'(a_im) * FW'(b_re);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < LAT; k++) begin
        q_re[k] <= '0;
        q_im[k] <= '0;
      end
    end else begin
      q_re[0] <= PW'(round_conv(64'(fr), SHIFT));
      q_im[0] <= PW'(round_conv(64'(fi), SHIFT));
      for (int k = 1; k < LAT; k++) begin
        q_re[k] <= q_re[k-1];
        q_im[k] <= q_im[k-1];
      end
    end
  end

  assign p_re = q_re[LAT-1];
  assign p_im = q_im[LAT-1];
endmodule
