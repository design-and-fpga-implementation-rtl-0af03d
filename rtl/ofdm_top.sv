// ofdm_top: extended-CP QPSK-OFDM link with a 3-path Rayleigh fading channel
// and an AWGN channel, transmitter and receiver on one chip.
//
// Transmitter: information bits (20 Mbit/s) -> QPSK mapping (10 Msym/s) ->
// zero padding (512 symbols + 128 gap slots, 12.5 Msps) -> 512-point IFFT
// with 128-sample cyclic prefix -> 3-path fading channel (applied at
// baseband, before the I/Q modulator, as in the document) -> I/Q modulator
// and up-conversion to a 25 MHz IF at 100 Msps.
// Channel: white Gaussian noise scaled by es_no is added to the IF signal.
// Receiver: I/Q down-conversion and down-sampling by 8 -> 512-point FFT
// started by the delayed transmitter frame sync -> division by the channel
// response H(f), computed from the known path gains -> puncturing (hard
// decision, prefix removal, 12.5 -> 10 Msps) -> QPSK demapping -> bits.
// The transmitter and receiver share the clock and the frame sync, so there
// is no carrier or timing recovery (the document assumes perfect
// synchronisation).
//
// Timing: one clock, 100 MHz. bit_en pulses once per 5 clocks; bit_in is
// taken in that cycle. Recovered bits leave on bit_out with bit_out_valid at
// the same rate, 30771 clocks (about 6 OFDM frames of 5120 clocks) after they
// entered.
// es_no is a signed Q4.12 noise amplitude factor (the standard deviation of
// the added noise), 0 for no noise; Eb/N0 = 1 / (1024 * es_no^2), so
// es_no = 128 / sqrt(Eb/N0) as an integer. The
// receiver's sampling instants (RX_TAKE_I/Q) and the delay of the frame sync
// (RX_SYNC_DLY) follow from the fixed latencies listed below; they are this
// design's, the document sets the equivalent delays by hand.
module ofdm_top
  import ofdm_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  output logic               bit_en,
  input  logic               bit_in,
  input  logic signed [15:0] es_no,
  output logic               bit_out,
  output logic               bit_out_valid,
  output sample_t            if_out,
  output sample_t            rx_if
);
  // Latencies (clocks): channel out register -> IF out 4 (up-converter),
  // + 2 (AWGN adder), + 3 (down-converter multipliers) = 9. A transmit
  // baseband sample is held for 8 clocks from slot count 6; the in-phase
  // branch reads it where the carrier phase makes cos = 1 (slot count 1) and
  // the quadrature branch where sin = -1 (slot count 2), i.e. 9 clocks later
  // at counts 2 and 3. The received sample is complete one clock later, 14
  // clocks after the channel output's frame sync.
  localparam logic [2:0]  RX_TAKE_I   = 3'd2;
  localparam logic [2:0]  RX_TAKE_Q   = 3'd3;
  localparam int unsigned RX_SYNC_DLY = 14;
  localparam int unsigned CAR_DLY     = 2;

  logic       bit_stb, sym_stb, slot_stb;
  logic [2:0] slot_cnt;

  ofdm_timing u_timing (.clk, .rst, .bit_stb, .sym_stb, .slot_stb, .slot_cnt);
  assign bit_en = bit_stb;

  // ---------------- transmitter
  qpsk_t    m_i, m_q;
  logic     m_v;
  logic     zp_v, zp_sof, zp_data;
  qpsk_t    zp_i, zp_q;
  cstream_t tx_bb, ch_out;
  sample_t  ch_re [3];
  sample_t  ch_im [3];
  logic signed [15:0] tx_sin, tx_cos, rx_sin, rx_cos;

  logic unused_sof;
  assign unused_sof = zp_sof;  // ofdm_mod frames itself from the data flag

  qpsk_mod u_qmod (.clk, .rst, .bit_stb, .bit_in, .i_out(m_i), .q_out(m_q), .sym_valid(m_v));

  zero_pad u_zpad (.clk, .rst, .sym_valid(m_v), .i_in(m_i), .q_in(m_q), .slot_stb,
                   .out_v(zp_v), .out_sof(zp_sof), .out_data(zp_data), .i_out(zp_i), .q_out(zp_q));

  ofdm_mod u_omod (.clk, .rst, .in_v(zp_v), .in_data(zp_data), .in_i(zp_i), .in_q(zp_q),
                   .slot_stb, .out(tx_bb));

  fading_channel u_fade (.clk, .rst, .in(tx_bb), .out(ch_out), .ch_re, .ch_im);

  dds_carrier u_tx_car (.clk, .rst, .sin_out(tx_sin), .cos_out(tx_cos));

  iq_upconv u_duc (.clk, .rst, .i_in(ch_out.re), .q_in(ch_out.im), .cos_in(tx_cos),
                   .sin_in(tx_sin), .out(if_out));

  // ---------------- channel noise
  awgn_channel u_awgn (.clk, .rst, .in(if_out), .es_no, .out(rx_if));

  // ---------------- receiver
  sample_t  rx_i, rx_q;
  logic     rx_v;
  logic [RX_SYNC_DLY-1:0] sync_d;
  logic     rx_sof;
  cstream_t y_f;
  logic     x_v, x_sof;
  logic signed [19:0] x_re, x_im;
  logic     p_v;
  qpsk_t    p_i, p_q;

  dds_carrier u_rx_car (.clk, .rst, .sin_out(rx_sin), .cos_out(rx_cos));

  iq_downconv #(.CAR_DLY(CAR_DLY)) u_ddc (
    .clk, .rst, .in(rx_if), .cos_in(rx_cos), .sin_in(rx_sin),
    .take_i(slot_cnt == RX_TAKE_I), .take_q(slot_cnt == RX_TAKE_Q),
    .i_out(rx_i), .q_out(rx_q), .out_v(rx_v));

  // transmitter frame sync delayed to the first received sample of the frame
  always_ff @(posedge clk) begin
    if (rst) sync_d <= '0;
    else     sync_d <= {sync_d[RX_SYNC_DLY-2:0], ch_out.v & ch_out.sof};
  end
  assign rx_sof = sync_d[RX_SYNC_DLY-1];

  ofdm_demod u_odem (.clk, .rst, .in_v(rx_v), .in_sof(rx_sof), .in_re(rx_i), .in_im(rx_q),
                     .out(y_f));

  phase_noise_cancel u_pnc (.clk, .rst, .rx_v, .rx_sof, .ch_re, .ch_im, .y(y_f),
                            .out_v(x_v), .out_sof(x_sof), .x_re, .x_im);

  puncture u_punc (.clk, .rst, .in_v(x_v), .in_sof(x_sof), .in_i(x_re), .in_q(x_im),
                   .sym_stb, .out_v(p_v), .out_i(p_i), .out_q(p_q));

  qpsk_demod u_qdem (.clk, .rst, .sym_valid(p_v), .i_in(p_i), .q_in(p_q), .bit_stb,
                     .bit_out, .bit_valid(bit_out_valid));

  // rx_sof must coincide with a received sample slot
  assert property (@(posedge clk) disable iff (rst) rx_sof |-> rx_v)
    else $error("ofdm_top: receiver frame sync off the sample slot");
endmodule
