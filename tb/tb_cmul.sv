// tb_cmul: random complex operands every clock, plain and conjugated; the
// product, rounded half-to-even by 12 bits and wrapped to 18 bits, must
// appear exactly 3 clocks later.
module tb_cmul;
  logic clk = 0, rst = 1;
  logic conj_b = 0;
  logic signed [17:0] ar = 0, ai = 0, br = 0, bi = 0, pr, pi;
  cmul #(.AW(18), .BW(18), .PW(18), .SHIFT(12), .LAT(3)) dut (
    .clk, .rst, .conj_b, .a_re(ar), .a_im(ai), .b_re(br), .b_im(bi), .p_re(pr), .p_im(pi));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [17:0] er [$];
  logic signed [17:0] ei [$];
  function automatic logic signed [17:0] rnd(input logic signed [63:0] v);
    logic signed [63:0] q, r;
    q = v >>> 12; r = v - (q <<< 12);
    if (r > 2048 || (r == 2048 && q[0])) q++;
    return 18'(q);
  endfunction
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 600; t++) begin
      logic signed [63:0] xr, xi, sb;
      @(posedge clk);
      ar <= 18'($urandom); ai <= 18'($urandom); br <= 18'($urandom); bi <= 18'($urandom);
      conj_b <= (t >= 300);
      #1;
      sb = conj_b ? -64'(bi) : 64'(bi);
      xr = 64'(ar) * 64'(br) - 64'(ai) * sb;
      xi = 64'(ar) * sb + 64'(ai) * 64'(br);
      er.push_back(rnd(xr)); ei.push_back(rnd(xi));
      if (er.size() > 3) begin
        logic signed [17:0] a, b;
        a = er.pop_front(); b = ei.pop_front();
        checks++;
        if (pr != a || pi != b) begin failures++; if (failures < 10) $display("FAIL t=%0d got %0d,%0d exp %0d,%0d", t, pr, pi, a, b); end
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
