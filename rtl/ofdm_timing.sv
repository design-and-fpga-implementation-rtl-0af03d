// ofdm_timing: rate strobes of the OFDM link.
//
// Three free-running counters divide the 100 MHz clock into the bit strobe
// (one clock in 5, 20 Mbit/s), the QPSK symbol strobe (one in 10, the second
// bit strobe of each pair) and the OFDM sample-slot strobe (one in 8,
// 12.5 Msps). slot_cnt is also brought out so that the receiver can pick its
// down-sampling instants relative to the slot. The rates follow the document;
// the counter form and reset values are this design's choice. All strobes are
// registered-counter decodes: a strobe is high in the cycle its counter is 0.
module ofdm_timing #(
  parameter int unsigned BIT_DIV  = 5,
  parameter int unsigned SLOT_DIV = 8
) (
  input  logic       clk,
  input  logic       rst,
  output logic       bit_stb,   // one clock per information bit
  output logic       sym_stb,   // one clock per QPSK symbol (with every 2nd bit_stb)
  output logic       slot_stb,  // one clock per OFDM sample slot
  output logic [$clog2(SLOT_DIV)-1:0] slot_cnt
);
  logic [$clog2(BIT_DIV)-1:0] bit_cnt;
  logic                       bit_phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_cnt   <= '0;
      bit_phase <= 1'b0;
      slot_cnt  <= '0;
    end else begin
      bit_cnt  <= (bit_cnt == $bits(bit_cnt)'(BIT_DIV - 1)) ? '0 : bit_cnt + 1'b1;
      if (bit_cnt == $bits(bit_cnt)'(BIT_DIV - 1)) bit_phase <= ~bit_phase;
      slot_cnt <= (slot_cnt == $bits(slot_cnt)'(SLOT_DIV - 1)) ? '0 : slot_cnt + 1'b1;
    end
  end

  always_comb begin
    bit_stb  = (bit_cnt == '0);
    sym_stb  = bit_stb & bit_phase;
    slot_stb = (slot_cnt == '0);
  end
endmodule
