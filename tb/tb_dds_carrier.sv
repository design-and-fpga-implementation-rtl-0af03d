// tb_dds_carrier: the default carrier must repeat sine 0,-1,0,1 and cosine
// 1,0,-1,0 (times 2^14) clock by clock, starting at phase 0 after reset.
module tb_dds_carrier;
  logic clk = 0, rst = 1;
  logic signed [15:0] s, c;
  dds_carrier dut (.clk, .rst, .sin_out(s), .cos_out(c));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int ES [4] = '{0, -16384, 0, 16384};
  localparam int EC [4] = '{16384, 0, -16384, 0};
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int t = 0; t < 64; t++) begin
      @(negedge clk);
      checks++;
      if (int'(s) != ES[t % 4] || int'(c) != EC[t % 4]) begin
        failures++; if (failures < 10) $display("FAIL t=%0d sin %0d cos %0d", t, s, c);
      end
      @(posedge clk);
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
