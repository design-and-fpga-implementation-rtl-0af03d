// qpsk_demod: QPSK demapper and parallel-to-serial converter.
//
// The sign bits of the I and Q samples are concatenated, I in the high bit and
// Q in the low bit, and address a 4-word ROM holding [0,2,1,3], as printed in
// the document. The ROM word is the 2-bit symbol, sent out most significant
// bit first on the next two bit strobes. This undoes qpsk_mod.
// Timing: a symbol captured on sym_valid is emitted on the following two
// bit_stb cycles (bit_out registered, bit_valid pulses one clock after each
// used strobe). Samples must arrive no faster than one per two bit strobes.
module qpsk_demod
  import ofdm_pkg::*;
#(
  parameter int unsigned IW = 2  // width of the incoming I/Q samples
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sym_valid,
  input  logic signed [IW-1:0] i_in,
  input  logic signed [IW-1:0] q_in,
  input  logic                 bit_stb,
  output logic                 bit_out,
  output logic                 bit_valid
);
  localparam logic [1:0] ROM [4] = '{2'd0, 2'd2, 2'd1, 2'd3};

  logic [1:0] sym;
  logic [1:0] left;  // bits of the held symbol still to send

  always_ff @(posedge clk) begin
    if (rst) begin
      sym       <= '0;
      left      <= '0;
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (bit_stb && left != 0) begin
        bit_out   <= (left == 2) ? sym[1] : sym[0];
        bit_valid <= 1'b1;
        left      <= left - 1'b1;
      end
      if (sym_valid) begin
        sym  <= ROM[{i_in[IW-1], q_in[IW-1]}];
        left <= 2'd2;
      end
    end
  end

  // A new symbol must not overwrite one whose bits are still pending.
  assert property (@(posedge clk) disable iff (rst) sym_valid |-> (left == 0 || (left == 1 && bit_stb)))
    else $error("qpsk_demod: symbol overrun");
endmodule
