// tb_ofdm_timing: checks the rate strobes of the link: the bit strobe every
// 5 clocks, the symbol strobe every 10 clocks and only together with a bit
// strobe, the slot strobe every 8 clocks with slot_cnt counting 0..7.
module tb_ofdm_timing;
  logic clk = 0, rst = 1;
  logic bit_stb, sym_stb, slot_stb;
  logic [2:0] slot_cnt;
  ofdm_timing dut (.clk, .rst, .bit_stb, .sym_stb, .slot_stb, .slot_cnt);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int t = 0, last_bit = -1, last_sym = -1, last_slot = -1, nb = 0, ns = 0, nl = 0;
  logic [2:0] exp_cnt = 3'd1;  // one clock after reset release

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, t); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (t = 0; t < 400; t++) begin
      @(negedge clk);
      chk(slot_cnt == exp_cnt, "slot_cnt");
      exp_cnt++;
      if (bit_stb) begin
        if (last_bit >= 0) chk(t - last_bit == 5, "bit period");
        last_bit = t; nb++;
      end
      if (sym_stb) begin
        chk(bit_stb, "sym without bit");
        if (last_sym >= 0) chk(t - last_sym == 10, "sym period");
        last_sym = t; ns++;
      end
      if (slot_stb) begin
        chk(slot_cnt == 0, "slot phase");
        if (last_slot >= 0) chk(t - last_slot == 8, "slot period");
        last_slot = t; nl++;
      end
    end
    chk(nb == 80 && ns == 40 && nl == 50, "strobe counts");
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
