// zero_pad: zero padding in front of the IFFT (serial-to-parallel, constant,
// concatenation and parallel-to-serial in the document).
//
// QPSK symbols arrive at 10 Msym/s. Each group of NDATA (512) symbols is
// collected and then replayed on the 12.5 Msps sample slots: NZERO (128)
// zero samples first, then the NDATA symbols in arrival order, 640 slots per
// frame, 5/4 of the input rate. The zero slots are the time gap in which the
// IFFT writes the cyclic prefix, so out_data is low on them and the IFFT
// does not load them.
// The document builds this from a 1024-bit serial-to-parallel word (most
// significant word first), a 256-bit zero constant on the high side of a
// concatenation and a parallel-to-serial converter; read most significant
// word first, that word gives exactly this order. Here it is produced with a
// two-bank memory (one bank fills while the other is read), this design's
// choice.
// Timing: a frame starts on the first slot_stb after a bank is full; out_v is
// registered, one clock after slot_stb. out_sof marks the frame's first slot
// (the first zero).
module zero_pad
  import ofdm_pkg::*;
#(
  parameter int unsigned NDATA = 512,
  parameter int unsigned NZERO = 128
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  sym_valid,
  input  qpsk_t i_in,
  input  qpsk_t q_in,
  input  logic  slot_stb,
  output logic  out_v,
  output logic  out_sof,
  output logic  out_data,  // slot carries a QPSK symbol (not a padding zero)
  output qpsk_t i_out,
  output qpsk_t q_out
);
  localparam int unsigned AW = $clog2(NDATA);
  localparam int unsigned FW = $clog2(NDATA + NZERO);

  logic [3:0]    mem [2][NDATA];
  logic          wbank, rbank;
  logic [AW-1:0] wptr;
  logic [1:0]    full;
  logic          reading;
  logic [FW-1:0] rslot;

  always_ff @(posedge clk) begin
    if (rst) begin
      wbank <= 1'b0;
      wptr  <= '0;
      full  <= '0;
    end else begin
      if (sym_valid) begin
        mem[wbank][wptr] <= {i_in, q_in};
        if (wptr == AW'(NDATA - 1)) begin
          wptr        <= '0;
          wbank       <= ~wbank;
          full[wbank] <= 1'b1;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
      if (reading && slot_stb && rslot == FW'(NDATA + NZERO - 1)) full[rbank] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rbank    <= 1'b0;
      reading  <= 1'b0;
      rslot    <= '0;
      out_v    <= 1'b0;
      out_sof  <= 1'b0;
      out_data <= 1'b0;
      i_out    <= '0;
      q_out    <= '0;
    end else begin
      out_v   <= 1'b0;
      out_sof <= 1'b0;
      if (slot_stb && (reading || full[rbank])) begin
        out_v    <= 1'b1;
        out_sof  <= (rslot == 0);
        out_data <= (rslot >= FW'(NZERO));
        if (rslot >= FW'(NZERO)) begin
          i_out <= qpsk_t'(mem[rbank][AW'(rslot - FW'(NZERO))][3:2]);
          q_out <= qpsk_t'(mem[rbank][AW'(rslot - FW'(NZERO))][1:0]);
        end else begin
          i_out <= '0;
          q_out <= '0;
        end
        if (rslot == FW'(NDATA + NZERO - 1)) begin
          rslot   <= '0;
          rbank   <= ~rbank;
          reading <= 1'b0;
        end else begin
          rslot   <= rslot + 1'b1;
          reading <= 1'b1;
        end
      end
    end
  end
endmodule
