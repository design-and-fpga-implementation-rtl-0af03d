// dds_carrier: carrier signal generator (direct digital synthesiser).
//
// A PW-bit phase accumulator advances by PINC every clock and its top LUTA
// bits address sine and cosine lookup tables computed at elaboration; the
// table outputs are resized to 16-bit words with 14 fraction bits (the
// document's CMult resizing to 16 bits). The default increment, -1/4 of a
// turn per clock, gives the document's 25 MHz carrier at 100 MHz sampling
// with sine 0,-1,0,1 and cosine 1,0,-1,0 in successive clocks. Phase offset
// is zero. The accumulator and table sizes are this design's choice.
// Timing: outputs are registered; after reset the first values (phase 0,
// sine 0, cosine 1) appear on the clock after rst falls, then one phase step
// per clock.
module dds_carrier #(
  parameter int unsigned PW   = 16,
  parameter logic [15:0] PINC = 16'hC000,  // -1/4 turn per clock
  parameter int unsigned LUTA = 4,
  parameter int unsigned OW   = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  output logic signed [OW-1:0] sin_out,
  output logic signed [OW-1:0] cos_out
);
  typedef logic signed [OW-1:0] w_t;
  typedef w_t tab_t [1 << LUTA];

  function automatic tab_t gen(input bit want_sin);
    tab_t t;
    real  a, v;
    for (int k = 0; k < (1 << LUTA); k++) begin
      a    = 2.0 * 3.14159265358979323846 * real'(k) / real'(1 << LUTA);
      v    = (want_sin ? $sin(a) : $cos(a)) * real'(1 << (OW - 2));
      t[k] = w_t'($rtoi(v + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tab_t SIN_T = gen(1'b1);
  localparam tab_t COS_T = gen(1'b0);

  logic [PW-1:0] acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      sin_out <= '0;
      cos_out <= '0;
    end else begin
      acc     <= acc + PW'(PINC);
      sin_out <= SIN_T[acc[PW-1 -: LUTA]];
      cos_out <= COS_T[acc[PW-1 -: LUTA]];
    end
  end
endmodule
