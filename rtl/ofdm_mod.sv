// ofdm_mod: OFDM modulator (IFFT with cyclic-prefix insertion).
//
// The document's modulator is an FFT core set to inverse transform with CP
// length 128 and a CMult of 0.5 on each input and 1/256 on each output.
// Here: the +1/-1 QPSK components are scaled by 0.5 into 8-bit words with
// 6 fraction bits (so 0.5 = 32), transformed by the unscaled 512-point IFFT
// (18-bit result, 6 fraction bits) and scaled by 1/256 into the link's
// Q6.12 sample format (a shift by 2 with convergent rounding). Together the
// two scalings are the 1/N of the inverse DFT.
// Input: the zero-padded slot stream; only slots with in_data are loaded, the
// zero slots are the gap the prefix fills. Output: 640-slot frames paced by
// slot_stb, CP first; out.sof is the frame sync passed on to the channel and
// the receiver (the document's "edone"). Latency is about two frames because
// the streaming core is flushed by the following frame.
module ofdm_mod
  import ofdm_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     in_v,
  input  logic     in_data,
  input  qpsk_t    in_i,
  input  qpsk_t    in_q,
  input  logic     slot_stb,
  output cstream_t out
);
  localparam int unsigned IW = 8;
  localparam int unsigned OW = IW + LOG2N + 1;  // 18

  logic                 ld;
  logic signed [IW-1:0] xr, xi;
  logic                 fv, fsof, fdone;
  logic [LOG2N-1:0]     fidx;
  logic signed [OW-1:0] fr, fi;

  // CMult x0.5: +/-1 -> +/-0.5 with 6 fraction bits
  always_ff @(posedge clk) begin
    if (rst) begin
      ld <= 1'b0;
      xr <= '0;
      xi <= '0;
    end else begin
      ld <= in_v & in_data;
      xr <= IW'(in_i) <<< (IW - 3);
      xi <= IW'(in_q) <<< (IW - 3);
    end
  end

  fft_sdf #(.LOG2N(LOG2N), .IW(IW)) u_ifft (
    .clk, .rst, .fwd_inv(1'b0), .cp_len(LOG2N'(CP_LEN)),
    .in_valid(ld), .in_re(xr), .in_im(xi),
    .out_slot(slot_stb), .out_valid(fv), .out_sof(fsof), .done(fdone),
    .out_index(fidx), .out_re(fr), .out_im(fi));

  // CMult x1/256: from 6 to 14 fraction bits, i.e. Q6.12 after a shift by 2
  always_comb begin
    out.v   = fv;
    out.sof = fsof;
    out.re  = sample_t'(sat(round_conv(64'(fr), 2), SW));
    out.im  = sample_t'(sat(round_conv(64'(fi), 2), SW));
  end

  logic unused;
  assign unused = fdone ^ (^fidx);
endmodule
