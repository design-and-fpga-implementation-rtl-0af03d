// ofdm_demod: OFDM demodulator (forward FFT).
//
// Counts the 640 sample slots of each received frame from the frame sync
// in_sof, which is the transmitter's frame sync delayed to the first received
// sample (as the document delays the IFFT "edone" into the FFT "start").
// The 512 slots after the 128-slot cyclic prefix are loaded into an unscaled
// 512-point forward FFT (18-bit input, 28-bit output); its output frame is
// again 640 slots, with a copy of the last 128 bins in front, which the
// puncturing later discards, as in the document. Bins are saturated back to
// 18-bit Q6.12. Slots before the first frame sync after reset are ignored.
// Timing: output slots are paced by in_v; a frame appears about two frames
// after it was received (the streaming core is flushed by the next frame).
module ofdm_demod
  import ofdm_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     in_v,
  input  logic     in_sof,
  input  sample_t  in_re,
  input  sample_t  in_im,
  output cstream_t out
);
  localparam int unsigned OW = SW + LOG2N + 1;

  logic [$clog2(FRAME_LEN)-1:0] slot;
  logic                         started;
  logic                         ld;
  sample_t                      xr, xi;
  logic                         fv, fsof, fdone;
  logic [LOG2N-1:0]             fidx;
  logic signed [OW-1:0]         fr, fi;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot    <= '0;
      started <= 1'b0;
      ld      <= 1'b0;
      xr      <= '0;
      xi      <= '0;
    end else begin
      ld <= 1'b0;
      if (in_v) begin
        if (in_sof) begin
          started <= 1'b1;
          slot    <= 1;
        end else if (started) begin
          slot <= (slot == $bits(slot)'(FRAME_LEN - 1)) ? '0 : slot + 1'b1;
        end
        ld <= started && !in_sof && slot >= $bits(slot)'(CP_LEN);
        xr <= in_re;
        xi <= in_im;
      end
    end
  end

  fft_sdf #(.LOG2N(LOG2N), .IW(SW)) u_fft (
    .clk, .rst, .fwd_inv(1'b1), .cp_len(LOG2N'(CP_LEN)),
    .in_valid(ld), .in_re(xr), .in_im(xi),
    .out_slot(in_v), .out_valid(fv), .out_sof(fsof), .done(fdone),
    .out_index(fidx), .out_re(fr), .out_im(fi));

  always_comb begin
    out.v   = fv;
    out.sof = fsof;
    out.re  = sample_t'(sat(64'(fr), SW));
    out.im  = sample_t'(sat(64'(fi), SW));
  end

  logic unused;
  assign unused = fdone ^ (^fidx);
endmodule
