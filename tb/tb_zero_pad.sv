// tb_zero_pad: random symbols at 10 Msym/s in, sample slots every 8 clocks.
// Each output frame must be 640 slots: 128 zero slots without the data flag,
// then the next 512 symbols in arrival order with the flag set; the frame start
// flag on slot 0 only; frames back to back once running, 5120 clocks apart.
module tb_zero_pad;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  logic sym_valid = 0, slot_stb;
  qpsk_t i_in = 0, q_in = 0;
  logic out_v, out_sof, out_data;
  qpsk_t i_out, q_out;
  zero_pad dut (.clk, .rst, .sym_valid, .i_in, .q_in, .slot_stb, .out_v, .out_sof, .out_data, .i_out, .q_out);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0, pos = 0, nfr = 0, last_sof = -1;
  logic [3:0] q [$];
  assign slot_stb = (cyc % 8 == 0);
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s cyc %0d pos %0d", what, cyc, pos); end
  endtask
  always @(posedge clk) begin
    cyc <= rst ? 0 : cyc + 1;
    if (!rst && sym_valid) q.push_back({i_in, q_in});
    if (!rst && out_v) begin
      chk(out_sof == (pos == 0), "sof");
      if (out_sof) begin
        if (last_sof >= 0) chk(cyc - last_sof == 5120, "frame period");
        last_sof = cyc;
      end
      if (pos >= 128) begin
        logic [3:0] e;
        e = q.pop_front();
        chk(out_data && {i_out, q_out} == e, "data");
      end else begin
        chk(!out_data && i_out == 0 && q_out == 0, "zero");
      end
      pos++;
      if (pos == 640) begin pos = 0; nfr++; end
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    while (nfr < 4) begin
      @(posedge clk);
      sym_valid <= 0;
      if (cyc % 10 == 3) begin
        sym_valid <= 1;
        i_in <= $urandom_range(0, 1) ? 2'sd1 : -2'sd1;
        q_in <= $urandom_range(0, 1) ? 2'sd1 : -2'sd1;
      end
    end
    chk(nfr == 4, "frames");
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
