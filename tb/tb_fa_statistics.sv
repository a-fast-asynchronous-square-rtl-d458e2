// tb_fa_statistics: the Fast Algorithm statistics of the published analysis,
// reproduced exhaustively on the RTL. For N = 8, 12, 16, 20 and 24 every input is
// squared through the complementer chain and the DValue/Fast Algorithm
// stage with N/4 boxes and balls. Checked against the published numbers:
// the mean number of operand bits saved per square (8: 2.390625,
// 12: 5.633789063, 16: 10.00982666, 20: 16.04515457, 24: 23.28934193) and,
// for N = 16, 20 and 24,
// the probability that a ball of each width is put into a box. Every square
// must also still be exact.
module tb_fa_statistics;
  int checks = 0, failures = 0;

  fa_stats_probe #(.N(8))  p8  ();
  fa_stats_probe #(.N(12)) p12 ();
  fa_stats_probe #(.N(16)) p16 ();
  fa_stats_probe #(.N(20)) p20 ();
  fa_stats_probe #(.N(24)) p24 ();

  task automatic cmp(string what, real got, real exp);
    checks++;
    $display("%s: %0.9f (published %0.9f)", what, got, exp);
    if ((got - exp > 1e-6 * exp + 1e-8) || (exp - got > 1e-6 * exp + 1e-8)) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static real p16_pub[4] = '{0.1875, 0.354492188, 0.290222168, 0.108535767};  // widths 16, 12, 8, 4
    static real p20_pub[5] = '{0.1875, 0.354492188, 0.405166626, 0.182693481, 0.074933052};  // 20 .. 4
    static real p24_pub[6] = '{0.1875, 0.354492188, 0.405166626, 0.324520111, 0.137329817, 0.055988073};
    p8.run();  p12.run();  p16.run();  p20.run();  p24.run();
    checks++;
    if (p8.bad + p12.bad + p16.bad + p20.bad + p24.bad != 0) begin failures++; $display("FAIL inexact square"); end
    cmp("N=8  saved bits",  real'(p8.bits)  / 2.0**8,  2.390625);
    cmp("N=12 saved bits",  real'(p12.bits) / 2.0**12, 5.633789063);
    cmp("N=16 saved bits",  real'(p16.bits) / 2.0**16, 10.00982666);
    cmp("N=20 saved bits",  real'(p20.bits) / 2.0**20, 16.04515457);
    cmp("N=24 saved bits",  real'(p24.bits) / 2.0**24, 23.28934193);
    for (int k = 0; k < 4; k++)
      cmp($sformatf("N=16 P(ball of %0d bits moved)", 16 - 4 * k), real'(p16.moved[k]) / 2.0**16, p16_pub[k]);
    for (int k = 0; k < 5; k++)
      cmp($sformatf("N=20 P(ball of %0d bits moved)", 20 - 4 * k), real'(p20.moved[k]) / 2.0**20, p20_pub[k]);
    for (int k = 0; k < 6; k++)
      cmp($sformatf("N=24 P(ball of %0d bits moved)", 24 - 4 * k), real'(p24.moved[k]) / 2.0**24, p24_pub[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
