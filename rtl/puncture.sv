// puncture: hard decision and cyclic-prefix removal with rate change.
//
// Each equalised sample is cut to its sign bit, which addresses a 2-word ROM
// [+1,-1], giving a 2-bit +/-1 value, as in the document. Of each 640-slot
// frame (frame start in_sof) the first 128 slots, the prefix copy that the
// FFT output carries, are dropped; the other 512 values are written into one
// bank of a two-bank memory and, once the bank is full, replayed one per
// sym_stb (10 Msym/s), which lowers the rate from 12.5 to 10 Msps. The
// document does this with a 1280-bit serial-to-parallel converter, a 1024-bit
// slice and a parallel-to-serial converter; the two-bank memory is this
// design's equivalent. I and Q share the slot counting.
// Timing: out_v pulses on the clock after a sym_stb that sends a value.
module puncture
  import ofdm_pkg::*;
#(
  parameter int unsigned IW = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_v,
  input  logic                 in_sof,
  input  logic signed [IW-1:0] in_i,
  input  logic signed [IW-1:0] in_q,
  input  logic                 sym_stb,
  output logic                 out_v,
  output qpsk_t                out_i,
  output qpsk_t                out_q
);
  localparam qpsk_t ROM [2] = '{2'sd1, -2'sd1};
  localparam int unsigned AW = LOG2N;

  logic [$clog2(FRAME_LEN)-1:0] slot;
  logic                         started;
  logic [1:0]                   mem [2][NFFT];  // {sign I, sign Q}
  logic                         wbank, rbank;
  logic [AW-1:0]                wptr, rptr;
  logic [1:0]                   full;
  logic                         keep;

  assign keep = in_v && started && !in_sof && slot >= $bits(slot)'(CP_LEN);

  always_ff @(posedge clk) begin
    if (rst) begin
      slot    <= '0;
      started <= 1'b0;
      wbank   <= 1'b0;
      wptr    <= '0;
      full    <= '0;
    end else begin
      if (in_v) begin
        if (in_sof) begin
          started <= 1'b1;
          slot    <= 1;
        end else if (started) begin
          slot <= (slot == $bits(slot)'(FRAME_LEN - 1)) ? '0 : slot + 1'b1;
        end
      end
      if (keep) begin
        mem[wbank][wptr] <= {in_i[IW-1], in_q[IW-1]};
        wptr <= wptr + 1'b1;
        if (wptr == AW'(NFFT - 1)) begin
          full[wbank] <= 1'b1;
          wbank       <= ~wbank;
        end
      end
      if (sym_stb && full[rbank] && rptr == AW'(NFFT - 1)) full[rbank] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rbank <= 1'b0;
      rptr  <= '0;
      out_v <= 1'b0;
      out_i <= '0;
      out_q <= '0;
    end else begin
      out_v <= 1'b0;
      if (sym_stb && full[rbank]) begin
        out_v <= 1'b1;
        out_i <= ROM[mem[rbank][rptr][1]];
        out_q <= ROM[mem[rbank][rptr][0]];
        rptr  <= rptr + 1'b1;
        if (rptr == AW'(NFFT - 1)) rbank <= ~rbank;
      end
    end
  end
endmodule
