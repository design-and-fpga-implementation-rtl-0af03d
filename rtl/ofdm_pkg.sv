// ofdm_pkg: shared constants, types and fixed-point helpers of the OFDM link.
//
// The link runs from one 100 MHz clock. Information bits move at 20 Mbit/s
// (one per 5 clocks), QPSK symbols at 10 Msym/s (one per 10 clocks) and OFDM
// samples at 12.5 Msps (one per 8 clocks); these rates, the 512-point
// transform and the 128-sample extended cyclic prefix follow the LTE 5 MHz
// configuration. Baseband and IF samples are 18-bit signed words. The choice
// of 12 fraction bits for them (Q6.12) is this design's own.
package ofdm_pkg;

  localparam int unsigned NFFT       = 512;  // transform size
  localparam int unsigned LOG2N      = 9;
  localparam int unsigned CP_LEN     = 128;  // extended cyclic prefix
  localparam int unsigned FRAME_LEN  = NFFT + CP_LEN;  // 640 sample slots
  localparam int unsigned BIT_CLKS   = 5;    // 20 Mbit/s at 100 MHz
  localparam int unsigned SYM_CLKS   = 10;   // 10 Msym/s
  localparam int unsigned SLOT_CLKS  = 8;    // 12.5 Msps

  localparam int unsigned SW    = 18;  // baseband / IF sample width
  localparam int unsigned SFRAC = 12;  // fraction bits of a sample

  typedef logic signed [SW-1:0] sample_t;

  // A complex sample stream: v pulses for one clock per sample slot, sof marks
  // the first slot of a 640-slot frame (the first cyclic-prefix sample).
  typedef struct packed {
    logic    v;
    logic    sof;
    sample_t re;
    sample_t im;
  } cstream_t;

  // A QPSK component is +1 or -1, held in two bits.
  typedef logic signed [1:0] qpsk_t;

  // Arithmetic shift right by sh with convergent (round half to even)
  // rounding; the result keeps the input width.
  function automatic logic signed [63:0] round_conv(input logic signed [63:0] x,
                                                    input int unsigned sh);
    logic signed [63:0] q;
    logic signed [63:0] rem;
    logic signed [63:0] half;
    if (sh == 0) return x;
    q    = x >>> sh;
    rem  = x - (q <<< sh);
    half = 64'sd1 <<< (sh - 1);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    return q;
  endfunction

  // Saturate a wide value to w bits (w <= 63).
  function automatic logic signed [63:0] sat(input logic signed [63:0] x, input int unsigned w);
    logic signed [63:0] hi;
    logic signed [63:0] lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

endpackage
