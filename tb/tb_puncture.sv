// tb_puncture: 640-slot frames of random 20-bit I/Q samples every 8 clocks,
// frame start on slot 0; symbol strobes every 10 clocks. The output must be,
// in order, the signs (as +1/-1) of slots 128..639 of each frame only, one
// per symbol strobe, and no value may be lost or repeated.
module tb_puncture;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1, in_v = 0, in_sof = 0, sym_stb, out_v;
  logic signed [19:0] ii = 0, qq = 0;
  qpsk_t oi, oq;
  puncture dut (.clk, .rst, .in_v, .in_sof, .in_i(ii), .in_q(qq), .sym_stb, .out_v, .out_i(oi), .out_q(oq));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  logic [1:0] exp_q [$];
  assign sym_stb = (cyc % 10 == 0);
  always @(posedge clk) begin
    cyc <= rst ? 0 : cyc + 1;
    if (!rst && out_v) begin
      logic [1:0] e;
      checks++;
      e = exp_q.pop_front();
      if (oi != (e[1] ? -2'sd1 : 2'sd1) || oq != (e[0] ? -2'sd1 : 2'sd1)) begin
        failures++; if (failures < 10) $display("FAIL out %0d", nout);
      end
      nout++;
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 4; f++)
      for (int s = 0; s < 640; s++) begin
        logic signed [19:0] a, b;
        repeat (7) @(posedge clk);
        a = 20'($urandom); b = 20'($urandom);
        in_v <= 1; in_sof <= (s == 0); ii <= a; qq <= b;
        if (s >= 128) exp_q.push_back({a[19], b[19]});
        @(posedge clk);
        in_v <= 0; in_sof <= 0;
      end
    repeat (6000) @(posedge clk);
    checks++;
    if (nout != 4 * 512) begin failures++; $display("FAIL %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
