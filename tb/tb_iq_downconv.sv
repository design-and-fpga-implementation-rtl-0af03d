// tb_iq_downconv: a transmit-side model (sample held 8 clocks,
// I*cos + Q*sin with the 25 MHz carrier 6 clocks ahead of the receiver, as
// the up-converter and AWGN adder delay it) drives the down-converter with
// the receiver's own carrier. Sampling the in-phase branch at slot count 2
// and the quadrature branch at count 3 must return exactly the I and Q that
// were sent, one received sample per 8 clocks.
module tb_iq_downconv;
  import ofdm_pkg::*;
  logic clk = 0, rst = 1;
  sample_t rin = 0, i_out, q_out;
  logic signed [15:0] s, c;
  logic out_v;
  int cyc = 0;
  logic take_i, take_q;
  dds_carrier car (.clk, .rst, .sin_out(s), .cos_out(c));
  iq_downconv #(.CAR_DLY(2)) dut (.clk, .rst, .in(rin), .cos_in(c), .sin_in(s),
    .take_i, .take_q, .i_out, .q_out, .out_v);
  always #5 clk = ~clk;
  assign take_i = (cyc % 8 == 2);
  assign take_q = (cyc % 8 == 3);
  int checks = 0, failures = 0;
  sample_t bi, bq;
  sample_t txq [$];        // transmit IF samples, delayed by 6
  sample_t ei [$], eq [$];
  int phase;
  int nskip = 0;  // the first two received samples precede the model's first
  always @(posedge clk) begin
    if (rst) begin
      cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      // baseband changes at slot count 6 (as the channel output does)
      if (cyc % 8 == 6) begin
        bi = sample_t'($urandom_range(0, 8000)) - 4000;
        bq = sample_t'($urandom_range(0, 8000)) - 4000;
        ei.push_back(bi); eq.push_back(bq);
      end
      // carrier phase seen by the transmitter in this cycle: (cyc-1) mod 4
      phase = (cyc + 3) % 4;
      case (phase)
        0: txq.push_back(bi);
        1: txq.push_back(-bq);
        2: txq.push_back(-bi);
        default: txq.push_back(bq);
      endcase
      if (txq.size() > 5) rin <= txq.pop_front();
      if (out_v && nskip < 2) nskip++;
      else if (out_v) begin
        sample_t a, b;
        a = ei.pop_front(); b = eq.pop_front();
        checks++;
        if (i_out != a || q_out != b) begin
          failures++; if (failures < 10) $display("FAIL cyc %0d got %0d,%0d exp %0d,%0d", cyc, i_out, q_out, a, b);
        end
      end
    end
  end
  initial begin
    bi = 0; bq = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3000) @(posedge clk);
    checks++;
    if (checks < 300) failures++;
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
