// tb_fa_statistics_sampled: the Fast Algorithm statistics for the widths too
// large to enumerate, estimated on the RTL from random inputs. For N = 28,
// 32, ... 72, SAMPLES uniformly random inputs are squared through the
// complementer chain and the DValue/Fast Algorithm stage with N/4 boxes and
// balls. Checked against the published analysis: the mean number of operand
// bits saved per square, within 1 % (the sampling error is about 0.2 %),
// and, for N = 28, the probability that a ball of each width is put into a
// box, within 0.005 (about six standard errors). Every sampled square must
// also be exact. The exhaustive check of N = 8 to 24 is tb_fa_statistics.
module tb_fa_statistics_sampled;
  localparam int S = 1 << 17;
  int checks = 0, failures = 0;

  fa_sample_probe #(.N(28), .SAMPLES(4 * S)) p28 ();
  fa_sample_probe #(.N(32), .SAMPLES(S)) p32 ();
  fa_sample_probe #(.N(36), .SAMPLES(S)) p36 ();
  fa_sample_probe #(.N(40), .SAMPLES(S)) p40 ();
  fa_sample_probe #(.N(44), .SAMPLES(S)) p44 ();
  fa_sample_probe #(.N(48), .SAMPLES(S)) p48 ();
  fa_sample_probe #(.N(52), .SAMPLES(S)) p52 ();
  fa_sample_probe #(.N(56), .SAMPLES(S)) p56 ();
  fa_sample_probe #(.N(60), .SAMPLES(S)) p60 ();
  fa_sample_probe #(.N(64), .SAMPLES(S)) p64 ();
  fa_sample_probe #(.N(68), .SAMPLES(S)) p68 ();
  fa_sample_probe #(.N(72), .SAMPLES(S)) p72 ();

  task automatic cmp(string what, real got, real exp, real tol);
    checks++;
    $display("%s: %0.6f (published %0.6f)", what, got, exp);
    if ((got - exp > tol) || (exp - got > tol)) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic bits_check(int n, longint bits, int samples, real exp);
    cmp($sformatf("N=%0d saved bits", n), real'(bits) / real'(samples), exp, 0.01 * exp);
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ball widths 28, 24, 20, 16, 12, 8, 4
    static real p28_pub[7] = '{0.1875, 0.354492188, 0.405166626, 0.430890083, 0.210719883, 0.094671026, 0.04014175};
    p28.run(); p32.run(); p36.run(); p40.run(); p44.run(); p48.run();
    p52.run(); p56.run(); p60.run(); p64.run(); p68.run(); p72.run();
    checks++;
    if (p28.bad + p32.bad + p36.bad + p40.bad + p44.bad + p48.bad + p52.bad + p56.bad +
        p60.bad + p64.bad + p68.bad + p72.bad != 0) begin
      failures++;
      $display("FAIL inexact square");
    end
    bits_check(28, p28.bits, 4 * S, 32.20196016);
    bits_check(32, p32.bits, S, 42.35878338);
    bits_check(36, p36.bits, S, 54.18483815);
    bits_check(40, p40.bits, S, 67.27547568);
    bits_check(44, p44.bits, S, 82.03470844);
    bits_check(48, p48.bits, S, 98.07197134);
    bits_check(52, p52.bits, S, 115.7771509);
    bits_check(56, p56.bits, S, 134.7700275);
    bits_check(60, p60.bits, S, 155.4303336);
    bits_check(64, p64.bits, S, 177.385669);
    bits_check(68, p68.bits, S, 201.0081215);
    bits_check(72, p72.bits, S, 225.931363);
    for (int k = 0; k < 7; k++)
      cmp($sformatf("N=28 P(ball of %0d bits moved)", 28 - 4 * k), real'(p28.moved[k]) / real'(4 * S),
          p28_pub[k], 0.005);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
