// tb_cordic_div: random dividends and positive divisors of the sizes the
// receiver uses (37-bit products); each quotient, 20 bits with 14 fraction
// bits, must be within one LSB of y*2^14/x (or saturated when out of range)
// and arrive 20 clocks after its operands (seen by this checker one edge later), a new division every clock.
module tb_cordic_div;
  logic clk = 0, rst = 1, in_v = 0, out_v;
  logic signed [36:0] y = 0, x = 1;
  logic signed [19:0] q;
  cordic_div #(.DW(37), .QW(20), .QF(14)) dut (.clk, .rst, .in_v, .y, .x, .out_v, .q);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real eq [$];
  int t_in [$];
  int cyc = 0, nsat = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst && out_v) begin
    real e; int ti;
    e = eq.pop_front(); ti = t_in.pop_front();
    checks++;
    if (e > 524287.0) e = 524287.0;
    if (e < -524288.0) e = -524288.0;
    if (e >= 524287.0 || e <= -524288.0) nsat++;
    if (real'(q) - e > 1.01 || e - real'(q) > 1.01 || cyc - ti != 21) begin
      failures++; if (failures < 10) $display("FAIL q %0d exp %f lat %0d", q, e, cyc - ti);
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 1000; t++) begin
      logic signed [36:0] a, b;
      @(posedge clk);
      b = 37'($urandom_range(1, 32'h7FFF_FFFF)) >>> $urandom_range(0, 30);
      if (b == 0) b = 1;
      a = 37'($signed($urandom)) >>> $urandom_range(0, 31);
      if (t % 7 == 0) a = 37'(b) * 3;  // exact quotient 3.0
      in_v <= 1; y <= a; x <= b;
      eq.push_back(real'(a) * 16384.0 / real'(b));
      t_in.push_back(cyc);
    end
    @(posedge clk);
    in_v <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (eq.size() != 0) begin failures++; $display("FAIL %0d results missing", eq.size()); end
    $display("saturated cases %0d", nsat);
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
