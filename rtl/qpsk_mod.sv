// qpsk_mod: QPSK mapper (serial-to-parallel converter and two ROMs).
//
// Bits arrive one per bit_stb. Every two bits form a symbol address, the first
// bit being the most significant, as in the document's serial-to-parallel block.
// The address reads two 4-word ROMs, one for I and one for Q, holding the
// unnormalised Gray-coded constellation in {+1,-1}:
//   address 00 -> (+1,+1), 01 -> (-1,+1), 10 -> (+1,-1), 11 -> (-1,-1)
// i.e. the low address bit sets the sign of I and the high bit the sign of Q.
// The document gives only "Gray coding"; this table is chosen to be the
// inverse of the demodulator ROM [0,2,1,3] that it does print.
// Timing: on the clock after the second bit of a pair, i_out/q_out change and
// sym_valid pulses for one clock; the outputs are held until the next symbol.
module qpsk_mod
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  bit_stb,
  input  logic  bit_in,
  output qpsk_t i_out,
  output qpsk_t q_out,
  output logic  sym_valid
);
  localparam qpsk_t ROM_I [4] = '{2'sd1, -2'sd1, 2'sd1, -2'sd1};
  localparam qpsk_t ROM_Q [4] = '{2'sd1, 2'sd1, -2'sd1, -2'sd1};

  logic       have_first;
  logic       first_bit;
  logic [1:0] addr;

  assign addr = {first_bit, bit_in};

  always_ff @(posedge clk) begin
    if (rst) begin
      have_first <= 1'b0;
      first_bit  <= 1'b0;
      i_out      <= 2'sd1;
      q_out      <= 2'sd1;
      sym_valid  <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (bit_stb) begin
        if (!have_first) begin
          first_bit  <= bit_in;
          have_first <= 1'b1;
        end else begin
          i_out      <= ROM_I[addr];
          q_out      <= ROM_Q[addr];
          sym_valid  <= 1'b1;
          have_first <= 1'b0;
        end
      end
    end
  end
endmodule
