// wgn_gen: white Gaussian noise generator.
//
// The document's generator block uses Box-Muller and the central limit
// theorem and needs distinct seeds per instance. This design uses the
// central limit theorem alone: twelve 32-bit xorshift generators, each seeded
// from SEED, each give a uniform 11-bit value; their sum minus its mean has a
// standard deviation of exactly 2^11, so the output is a unit-variance
// Gaussian approximation in signed 16 bits with 11 fraction bits (range
// +/-6 sigma). One new sample per clock; output registered.
module wgn_gen #(
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic               clk,
  input  logic               rst,
  output logic signed [15:0] noise
);
  localparam int unsigned NU = 12;

  logic [31:0] st [NU];
  logic [31:0] nx [NU];
  logic signed [17:0] acc;

  function automatic logic [31:0] xs32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_comb begin
    acc = -18'sd12288;  // -12 * 2^10, the mean of the sum
    for (int k = 0; k < NU; k++) begin
      nx[k] = xs32(st[k]);
      acc   = acc + 18'($unsigned(st[k][31:21]));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NU; k++)
        // Integer multiply, not XOR: xorshift is linear over GF(2), so
        // seeds of the form SEED ^ c_k would make sub-generator k of every
        // instance share the term M^t(c_k), and outputs of different
        // instances would be dependent (their magnitudes correlate).
        st[k] <= (SEED * 32'(2 * k + 1) + 32'h9E37_79B9 * 32'(k + 1)) | 32'h1;
      noise <= '0;
    end else begin
      for (int k = 0; k < NU; k++) st[k] <= nx[k];
      noise <= 16'(acc);
    end
  end
endmodule
