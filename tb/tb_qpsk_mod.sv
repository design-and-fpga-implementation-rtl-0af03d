// tb_qpsk_mod: random bit pairs are mapped; the first bit of a pair must set
// the sign of Q and the second the sign of I (1 -> -1), one symbol per pair,
// arriving one clock after the second bit.
module tb_qpsk_mod;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  logic bit_stb = 0, bit_in = 0;
  qpsk_t i_out, q_out;
  logic sym_valid;
  qpsk_mod dut (.clk, .rst, .bit_stb, .bit_in, .i_out, .q_out, .sym_valid);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit b0, b1;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 200; n++) begin
      b0 = 1'($urandom_range(0, 1));
      b1 = 1'($urandom_range(0, 1));
      @(posedge clk); bit_stb <= 1; bit_in <= b0;
      @(posedge clk); bit_stb <= 0;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      @(posedge clk); bit_stb <= 1; bit_in <= b1;
      @(posedge clk); bit_stb <= 0;
      @(negedge clk);
      checks++;
      if (!sym_valid || i_out != (b1 ? -2'sd1 : 2'sd1) || q_out != (b0 ? -2'sd1 : 2'sd1)) begin
        failures++;
        if (failures < 10) $display("FAIL bits %b%b -> v=%b I=%0d Q=%0d", b0, b1, sym_valid, i_out, q_out);
      end
      @(negedge clk);
      checks++;
      if (sym_valid) begin failures++; $display("FAIL sym_valid longer than one clock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
