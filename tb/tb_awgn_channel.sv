// tb_awgn_channel: with es_no = 0 the output must equal the input of two
// clocks earlier; with es_no = 1.0 (4096) the added noise must have zero mean
// and a standard deviation of 1.0 in Q6.12 (4096), and with es_no = 0.25 a
// quarter of that. In every run each output sample must also equal, bit for
// bit, the input plus the noise of a second generator with the same seed
// scaled by es_no: the noise reaches the output 4 clocks after the
// generator shows it (3-clock multiplier, then the adder).
module tb_awgn_channel;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  sample_t in = 0, out;
  logic signed [15:0] es_no = 0;
  awgn_channel dut (.clk, .rst, .in, .es_no, .out);
  logic signed [15:0] w;
  wgn_gen #(.SEED(32'hA5A5_0F0F)) u_ref (.clk, .rst, .noise(w));
  longint wh [$];
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  sample_t h [$];
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  task automatic measure(input logic signed [15:0] k, input real exp_sd);
    real s, q, sd;
    es_no <= k;
    h.delete(); wh.delete();
    repeat (10) @(posedge clk);
    s = 0; q = 0;
    for (int t = 0; t < 20000; t++) begin
      @(posedge clk);
      in <= sample_t'($urandom_range(0, 4000)) - 2000;
      #1;
      h.push_back(in);
      wh.push_back(sat(round_conv(64'(w) * 64'(k), 11), SW));
      if (h.size() > 2) begin
        real d;
        d = real'(out) - real'(h.pop_front());
        if (wh.size() > 4) chk(d == real'(wh.pop_front()), "exact noise sample");
        s += d; q += d * d;
        if (k == 0) chk(d == 0.0, "noiseless pass-through");
      end
    end
    sd = $sqrt(q / 20000.0);
    $display("es_no %0d: mean %f sd %f", k, s / 20000.0, sd);
    chk(s / 20000.0 < 0.05 * exp_sd + 1 && s / 20000.0 > -0.05 * exp_sd - 1, "mean");
    chk(sd < 1.05 * exp_sd + 0.5 && sd > 0.95 * exp_sd - 0.5, "sigma");
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    measure(16'sd0, 0.0);
    measure(16'sd4096, 4096.0);
    measure(16'sd1024, 1024.0);
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
