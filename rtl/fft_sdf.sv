// fft_sdf: pipelined streaming radix-2 FFT/IFFT with natural-order output and
// cyclic-prefix insertion (the role of the FFT v7.1 core in the document).
//
// Architecture: LOG2N radix-2 decimation-in-frequency butterfly stages in a
// chain, each with its own memory (single-path delay feedback). Stage s holds
// D = N/2^(s+1) samples: while the first D samples of a block are stored, the
// differences kept from the previous block leave the stage multiplied by the
// twiddle W^(k*2^s); during the next D samples the stage emits sums at once and
// stores differences. The chain emits the transform in bit-reversed order; an
// output-shuffling memory with two banks writes it at bit-reversed addresses
// and reads it in natural order, preceded by the last cp_len samples (cyclic
// prefix). This follows the document's Figure 4-5 (radix-2 stages with
// memories, then output shuffling) and its configuration: natural order,
// unscaled arithmetic, convergent rounding, CP insertion. Stage grouping and
// block-floating scaling of the vendor core are not modelled.
//
// Arithmetic: unscaled. Inputs of IW bits are sign-extended to
// OW = IW + LOG2N + 1 bits, the full growth of an N-point transform, so no
// stage overflows. Twiddles are TWW-bit with TWW-2 fraction bits, computed
// at elaboration; each twiddle product is rounded to even. fwd_inv = 1 selects
// the forward transform (W = exp(-j2pi/N)), 0 the inverse without 1/N.
//
// Interface and timing: in_valid loads one sample; N loaded samples form a
// frame (frames are counted from reset, there is no separate start). The
// pipeline advances only on loaded samples, so the end of one frame is pushed
// out by the first samples of the next: a continuous stream of frames, as in
// the OFDM link, is required. When a frame is complete in the shuffling memory
// it is sent on the next out_slot strobes, one sample per strobe,
// cp_len + N in all; out_valid follows out_slot by one clock, out_sof marks
// the first sample, done the last. cp_len is taken at the start of each output
// frame. The output strobe rate must keep up with N loads per cp_len + N slots.
module fft_sdf
  import ofdm_pkg::round_conv;
#(
  parameter int unsigned LOG2N = 9,
  parameter int unsigned IW    = 8,
  parameter int unsigned TWW   = 16,
  parameter int unsigned OW    = IW + LOG2N + 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    fwd_inv,
  input  logic [LOG2N-1:0]        cp_len,
  input  logic                    in_valid,
  input  logic signed [IW-1:0]    in_re,
  input  logic signed [IW-1:0]    in_im,
  input  logic                    out_slot,
  output logic                    out_valid,
  output logic                    out_sof,
  output logic                    done,
  output logic [LOG2N-1:0]        out_index,
  output logic signed [OW-1:0]    out_re,
  output logic signed [OW-1:0]    out_im
);
  localparam int unsigned N = 1 << LOG2N;
  localparam int unsigned W = OW;

  typedef logic signed [TWW-1:0] tw_t;
  typedef tw_t tw_tab_t [N/2];

  // W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N), scaled by 2^(TWW-2)
  function automatic tw_tab_t gen_tw(input bit want_sin);
    tw_tab_t t;
    real     ang;
    for (int k = 0; k < N / 2; k++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(N);
      t[k] = tw_t'($rtoi((want_sin ? $sin(ang) : $cos(ang)) * real'(1 << (TWW - 2))
                         + ((want_sin ? $sin(ang) : $cos(ang)) >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t TW_COS = gen_tw(1'b0);
  localparam tw_tab_t TW_SIN = gen_tw(1'b1);

  // stage interconnect: index s is the input of stage s
  logic                st_v  [LOG2N+1];
  logic signed [W-1:0] st_re [LOG2N+1];
  logic signed [W-1:0] st_im [LOG2N+1];

  assign st_v[0]  = in_valid;
  assign st_re[0] = W'(in_re);
  assign st_im[0] = W'(in_im);

  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    localparam int unsigned D  = N >> (s + 1);
    localparam int unsigned CW = LOG2N - s;              // counts 2*D samples
    localparam int unsigned PW = (CW > 1) ? CW - 1 : 1;  // memory address width

    logic [CW-1:0]         cnt;
    logic                  primed;
    logic [PW-1:0]         ptr;
    logic                  phase;
    logic signed [2*W-1:0] mem [D];
    logic signed [W-1:0]   a_re, a_im;
    logic signed [W-1:0]   x_re, x_im;
    logic signed [W-1:0]   y_re, y_im;
    logic [LOG2N-2:0]      tw_idx;
    tw_t                   c, sn;
    logic signed [W+TWW:0] p_re, p_im;

    assign ptr   = (CW > 1) ? PW'(cnt[PW-1:0]) : '0;
    assign phase = cnt[CW-1];
    assign x_re  = st_re[s];
    assign x_im  = st_im[s];
    assign {a_re, a_im} = mem[ptr];
    assign tw_idx = (LOG2N - 1)'(ptr) << s;
    assign c  = TW_COS[tw_idx];
    // forward: W = c - j*sin ; inverse: W = c + j*sin
    assign sn = fwd_inv ? -TW_SIN[tw_idx] : TW_SIN[tw_idx];

    always_comb begin
      p_re = (W + TWW + 1)'(a_re) * (W + TWW + 1)'(c) - (W + TWW + 1)'(a_im) * (W + TWW + 1)'(sn);
      p_im = (W + TWW + 1)'(a_re) * (W + TWW + 1)'(sn) + (W + TWW + 1)'(a_im) * (W + TWW + 1)'(c);
      if (phase) begin
        y_re = a_re + x_re;
        y_im = a_im + x_im;
      end else begin
        y_re = W'(round_conv(64'(p_re), TWW - 2));
        y_im = W'(round_conv(64'(p_im), TWW - 2));
      end
    end

    always_ff @(posedge clk) begin
      if (st_v[s]) begin
        if (phase) mem[ptr] <= {a_re - x_re, a_im - x_im};
        else       mem[ptr] <= {x_re, x_im};
      end
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        cnt          <= '0;
        primed       <= 1'b0;
        st_v[s+1]    <= 1'b0;
        st_re[s+1]   <= '0;
        st_im[s+1]   <= '0;
      end else begin
        st_v[s+1] <= st_v[s] & (primed | phase);
        if (st_v[s]) begin
          cnt        <= cnt + 1'b1;
          if (phase) primed <= 1'b1;
          st_re[s+1] <= y_re;
          st_im[s+1] <= y_im;
        end
      end
    end
  end

  // ---- output shuffling: bit-reversed -> natural order, with cyclic prefix
  logic signed [2*W-1:0] ob_mem [2][N];
  logic [LOG2N-1:0]      wcnt, wrev;
  logic                  wb, rb;
  logic [1:0]            ready;
  logic                  reading;
  logic [LOG2N:0]        rc;
  logic [LOG2N-1:0]      cp_q;
  logic [LOG2N-1:0]      raddr;
  logic [LOG2N:0]        cp_now;
  logic                  last_rd;

  always_comb begin
    for (int b = 0; b < LOG2N; b++) wrev[b] = wcnt[LOG2N-1-b];
  end

  assign cp_now  = reading ? {1'b0, cp_q} : {1'b0, cp_len};
  assign raddr   = (rc < cp_now) ? LOG2N'((LOG2N + 1)'(N) - cp_now + rc) : LOG2N'(rc - cp_now);
  assign last_rd = (rc == cp_now + (LOG2N + 1)'(N - 1));

  always_ff @(posedge clk) begin
    if (st_v[LOG2N]) ob_mem[wb][wrev] <= {st_re[LOG2N], st_im[LOG2N]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt      <= '0;
      wb        <= 1'b0;
      rb        <= 1'b0;
      ready     <= '0;
      reading   <= 1'b0;
      rc        <= '0;
      cp_q      <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      done      <= 1'b0;
      out_index <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      done      <= 1'b0;
      if (st_v[LOG2N]) begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == LOG2N'(N - 1)) begin
          ready[wb] <= 1'b1;
          wb        <= ~wb;
        end
      end
      if (out_slot && (reading || ready[rb])) begin
        if (!reading) cp_q <= cp_len;
        out_valid        <= 1'b1;
        out_sof          <= (rc == 0);
        out_index        <= raddr;
        {out_re, out_im} <= ob_mem[rb][raddr];
        if (last_rd) begin
          done      <= 1'b1;
          rc        <= '0;
          reading   <= 1'b0;
          ready[rb] <= 1'b0;
          rb        <= ~rb;
        end else begin
          rc      <= rc + 1'b1;
          reading <= 1'b1;
        end
      end
    end
  end
endmodule
