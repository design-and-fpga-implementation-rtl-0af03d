// tb_wgn_gen: statistics of 40000 samples: mean near 0, standard deviation
// near 2^11 (unit variance with 11 fraction bits), about 68% / 95% of samples
// within 1 / 2 sigma, and two generators with different seeds independent:
// neither the samples nor their magnitudes may correlate.
module tb_wgn_gen;
  logic clk = 0, rst = 1;
  logic signed [15:0] a, b;
  wgn_gen #(.SEED(32'h1234_5678)) dut (.clk, .rst, .noise(a));
  wgn_gen #(.SEED(32'h8765_4321)) dut2 (.clk, .rst, .noise(b));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real sm, sq, sab, sd, ma, mb, sma, smb, smab, cm;
  int n1, n2, zeros;
  localparam int NS = 40000;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    sm = 0; sq = 0; sab = 0; sma = 0; smb = 0; smab = 0; ma = 0; mb = 0; n1 = 0; n2 = 0; zeros = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    for (int t = 0; t < NS; t++) begin
      @(negedge clk);
      sm += real'(a); sq += real'(a) * real'(a); sab += real'(a) * real'(b);
      if (a > -2048 && a < 2048) n1++;
      if (a > -4096 && a < 4096) n2++;
      if (a == 0) zeros++;
      ma += (a < 0) ? -real'(a) : real'(a);
      mb += (b < 0) ? -real'(b) : real'(b);
      sma += real'(a) * real'(a); smb += real'(b) * real'(b);
      smab += ((a < 0) ? -real'(a) : real'(a)) * ((b < 0) ? -real'(b) : real'(b));
    end
    sd = $sqrt(sq / NS - (sm / NS) * (sm / NS));
    // correlation of |a| and |b|
    cm = (smab / NS - (ma / NS) * (mb / NS)) /
         $sqrt((sma / NS - (ma / NS) * (ma / NS)) * (smb / NS - (mb / NS) * (mb / NS)));
    $display("magnitude corr %f", cm);
    $display("mean %f sd %f p1 %f p2 %f corr %f", sm / NS, sd, real'(n1) / NS, real'(n2) / NS, sab / NS / sd / sd);
    chk((sm / NS) > -60.0 && (sm / NS) < 60.0, "mean");
    chk(sd > 1950.0 && sd < 2150.0, "sigma");
    chk(real'(n1) / NS > 0.66 && real'(n1) / NS < 0.71, "one-sigma share");
    chk(real'(n2) / NS > 0.94 && real'(n2) / NS < 0.965, "two-sigma share");
    chk((sab / NS / sd / sd) > -0.03 && (sab / NS / sd / sd) < 0.03, "independence");
    chk(cm > -0.03 && cm < 0.03, "magnitude independence");
    chk(zeros < NS / 50, "not stuck");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
