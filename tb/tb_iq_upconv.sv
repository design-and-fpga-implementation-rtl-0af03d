// tb_iq_upconv: random baseband and carrier words every clock; the output
// must be trunc(I*cos/2^14) + trunc(Q*sin/2^14), wrapped to 18 bits, exactly
// 4 clocks after the inputs.
module tb_iq_upconv;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  sample_t i_in = 0, q_in = 0, out;
  logic signed [15:0] c = 0, s = 0;
  iq_upconv dut (.clk, .rst, .i_in, .q_in, .cos_in(c), .sin_in(s), .out);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  sample_t hist [$];
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 500; t++) begin
      logic signed [63:0] a, b;
      sample_t e;
      @(posedge clk);
      i_in <= sample_t'($urandom); q_in <= sample_t'($urandom);
      c <= 16'($urandom); s <= 16'($urandom);
      #1;
      a = (64'(i_in) * 64'(c)) >>> 14;
      b = (64'(q_in) * 64'(s)) >>> 14;
      e = sample_t'(a) + sample_t'(b);
      hist.push_back(e);
      if (hist.size() > 4) begin
        e = hist.pop_front();
        checks++;
        if (out != e) begin failures++; if (failures < 10) $display("FAIL t=%0d got %0d exp %0d", t, out, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
