// tb_qpsk_demod: random 20-bit I/Q samples are demapped at the link's rates
// (a sample every 10 clocks, bit strobes every 5). The two bits per sample,
// in order, must be (Q negative, I negative), which inverts qpsk_mod.
module tb_qpsk_demod;
  logic clk = 0, rst = 1;
  logic sym_valid = 0, bit_stb;
  logic signed [19:0] i_in = 0, q_in = 0;
  logic bit_out, bit_valid;
  qpsk_demod #(.IW(20)) dut (.clk, .rst, .sym_valid, .i_in, .q_in, .bit_stb, .bit_out, .bit_valid);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit exp_q [$];
  assign bit_stb = (cyc % 5 == 0);
  always @(posedge clk) begin
    cyc <= rst ? 0 : cyc + 1;
    if (!rst && bit_valid) begin
      checks++;
      if (exp_q.size() == 0 || exp_q.pop_front() != bit_out) begin
        failures++; if (failures < 10) $display("FAIL bit at %0d", cyc);
      end
    end
  end
  initial begin
    int nsent;
    repeat (3) @(posedge clk);
    rst <= 0;
    nsent = 0;
    while (nsent < 300) begin
      @(posedge clk);
      sym_valid <= 0;
      if (cyc % 10 == 1) begin
        logic signed [19:0] a, b;
        a = 20'($urandom); b = 20'($urandom);
        sym_valid <= 1; i_in <= a; q_in <= b;
        exp_q.push_back(b[19]); exp_q.push_back(a[19]);
        nsent++;
      end
    end
    @(posedge clk);
    sym_valid <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d bits missing", exp_q.size()); end
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
