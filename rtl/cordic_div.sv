// cordic_div: fully parallel CORDIC divider, linear vectoring mode.
//
// Computes q = y / x for x > 0 as a QW-bit quotient with QF fraction bits
// (20 and 14 in the document). Linear-vectoring CORDIC drives y towards zero:
// at step j the residue y is reduced by +/- x*2^j (the sign opposite to y's)
// and the quotient accumulates -/+ 2^j, for j from QW-2 down to 0, in
// quotient LSB units. Working on y*2^QF keeps every shift exact. One pipeline
// register per step ("fully parallel"), so a new division can start every
// clock. Quotients beyond the range +/-2^(QW-QF-1) saturate at the range end;
// the result is within one LSB of the exact quotient otherwise.
// Timing: latency QW clocks (QW-1 steps and an output register); in_v is
// carried alongside as out_v.
module cordic_div #(
  parameter int unsigned DW = 37,  // width of x and y
  parameter int unsigned QW = 20,
  parameter int unsigned QF = 14
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_v,
  input  logic signed [DW-1:0] y,
  input  logic signed [DW-1:0] x,
  output logic                 out_v,
  output logic signed [QW-1:0] q
);
  localparam int unsigned NS = QW - 1;              // steps
  localparam int unsigned RW = DW + QW + QF + 1;    // residue width

  logic signed [RW-1:0] r   [NS+1];
  logic signed [RW-1:0] xs  [NS+1];
  logic signed [QW:0]   z   [NS+1];
  logic                 v   [NS+1];

  always_comb begin
    r[0]  = RW'(y) <<< QF;
    xs[0] = RW'(x);
    z[0]  = '0;
    v[0]  = in_v;
  end

  for (genvar k = 0; k < NS; k++) begin : g_step
    localparam int unsigned J = NS - 1 - k;  // weight 2^J of this step
    always_ff @(posedge clk) begin
      if (rst) begin
        r[k+1]  <= '0;
        xs[k+1] <= '0;
        z[k+1]  <= '0;
        v[k+1]  <= 1'b0;
      end else begin
        xs[k+1] <= xs[k];
        v[k+1]  <= v[k];
        if (r[k] >= 0) begin
          r[k+1] <= r[k] - (xs[k] <<< J);
          z[k+1] <= z[k] + (QW + 1)'(1 << J);
        end else begin
          r[k+1] <= r[k] + (xs[k] <<< J);
          z[k+1] <= z[k] - (QW + 1)'(1 << J);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q     <= '0;
      out_v <= 1'b0;
    end else begin
      out_v <= v[NS];
      // saturate into QW bits
      if (z[NS] > (QW + 1)'((1 << (QW - 1)) - 1))      q <= QW'((1 << (QW - 1)) - 1);
      else if (z[NS] < -(QW + 1)'(1 << (QW - 1)))      q <= QW'(1 << (QW - 1));
      else                                             q <= QW'(z[NS]);
    end
  end

  logic unused;
  assign unused = ^r[NS] ^ (^xs[NS]);
endmodule
