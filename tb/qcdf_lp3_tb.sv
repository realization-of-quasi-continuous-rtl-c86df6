// Self-checking testbench of qcdf_lp3 at a reduced width (N = 8).
//
// Coefficient pulses run over a 3-clock frame (f1 and f3 in slots 0 and 1,
// f2 in slot 2), giving rates 2/3, 1/3, 2/3 of the clock: the Butterworth
// ratio 1 : 1/2 : 1 at the fastest setting that keeps f1 and f2 apart. The input fx is a pulse train of
// programmable rate from a phase accumulator. The test applies a step to 35 %
// of the clock rate, then a full-rate step (which drives UDC2 into its upper
// rail), then removes the input (counters run down to the lower rail).
// Checks, every clock: all counts, the output pulse and the saturation flags
// against a cycle-exact behavioural model. Checks on the response: the output
// count follows the mean-rate differential equations of the LC ladder within
// a few LSBs, settles at fx/2 scaled by 2^N/f3, and overshoots by the 8 % of a
// third-order Butterworth step response.
module qcdf_lp3_tb;
  import qcdf_ref_pkg::*;
  localparam int unsigned N = 8;
  localparam real FS = real'(1 << N);

  logic clk = 0, rst_n = 0, fx = 0, f1 = 0, f2 = 0, f3 = 0;
  logic fy;
  logic [N-1:0] y, cnt1, cnt2;
  logic [2:0] ovf;
  int checks = 0, failures = 0;

  qcdf_lp3 #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  udc_model u[3];
  rm_model  r[3];
  real v[3];                 // mean-rate (ODE) state
  int unsigned acc = 0;      // fx phase accumulator, 16 bits
  int unsigned t = 0;
  int sat_hi = 0, sat_lo = 0, cancels = 0;
  real max_dev = 0.0;

  // One clock: drive inputs, compare, advance both models.
  task automatic run(int unsigned rate16, int unsigned cycles, output real peak);
    peak = 0.0;
    repeat (cycles) begin
      bit p[3], s[3];
      int n1, n2, n3;
      int unsigned ph = t % 3;
      real rf[3], pr[3];
      acc += rate16;
      fx = acc[16]; acc[16] = 1'b0;
      f1 = (ph != 2); f3 = (ph != 2); f2 = (ph == 2);
      #1;
      check(cnt1 == N'(u[0].cnt) && cnt2 == N'(u[1].cnt) && y == N'(u[2].cnt),
            $sformatf("t=%0d counts %0d %0d %0d exp %0d %0d %0d", t, cnt1, cnt2, y,
                      u[0].cnt, u[1].cnt, u[2].cnt));
      p[0] = r[0].step(f1, u[0].cnt);
      p[1] = r[1].step(f2, u[1].cnt);
      p[2] = r[2].step(f3, u[2].cnt);
      check(fy == p[2], $sformatf("t=%0d fy", t));
      n1 = int'(fx) - int'(p[0]) - int'(p[1]);
      n2 = int'(p[0]) - int'(p[2]);
      n3 = int'(p[1]) - int'(p[2]);
      if (fx && (p[0] || p[1])) cancels++;
      s[0] = u[0].step(n1); s[1] = u[1].step(n2); s[2] = u[2].step(n3);
      check(ovf == {s[2], s[1], s[0]}, $sformatf("t=%0d ovf", t));
      for (int k = 0; k < 3; k++) begin
        if (s[k] && ((k == 0 && n1 > 0) || (k == 1 && n2 > 0) || (k == 2 && n3 > 0))) sat_hi++;
        if (s[k] && ((k == 0 && n1 < 0) || (k == 1 && n2 < 0) || (k == 2 && n3 < 0))) sat_lo++;
      end
      // mean-rate equations of the ladder, one clock per step
      rf[0] = 2.0 / 3.0; rf[1] = 1.0 / 3.0; rf[2] = 2.0 / 3.0;
      for (int k = 0; k < 3; k++) pr[k] = rf[k] * v[k] / FS;
      v[0] += real'(rate16) / 65536.0 - pr[0] - pr[1];
      v[1] += pr[0] - pr[2];
      v[2] += pr[1] - pr[2];
      for (int k = 0; k < 3; k++) begin
        if (v[k] < 0.0) v[k] = 0.0;
        if (v[k] > FS - 1.0) v[k] = FS - 1.0;
      end
      if (real'(u[2].cnt) > peak) peak = real'(u[2].cnt);
      if ((real'(u[2].cnt) - v[2]) > max_dev) max_dev = real'(u[2].cnt) - v[2];
      if ((v[2] - real'(u[2].cnt)) > max_dev) max_dev = v[2] - real'(u[2].cnt);
      t++;
      @(negedge clk);
    end
  endtask

  initial begin
    real peak, final_y, expect_y;
    for (int k = 0; k < 3; k++) begin u[k] = new(N); r[k] = new(N); v[k] = 0.0; end
    @(negedge clk); @(negedge clk); rst_n = 1;
    // step to 35 % of the clock rate; time constant 2^N/(2/3) = 384 clocks
    run(22938, 20000, peak);
    final_y = real'(y);
    expect_y = FS * (0.35 / 2.0) / (2.0 / 3.0);
    $display("step: peak=%0.1f final=%0.1f expected=%0.1f max_dev=%0.2f", peak, final_y, expect_y, max_dev);
    check(final_y > expect_y * 0.96 && final_y < expect_y * 1.04, "final value fx/2");
    check(peak / expect_y > 1.04 && peak / expect_y < 1.13, "Butterworth overshoot");
    check(max_dev < 6.0, "follows ladder equations");
    // full-rate input: the L2 counter reaches its upper rail
    run(65535, 20000, peak);
    // input removed: counters run down to zero
    run(0, 30000, peak);
    check(y == 0 && cnt1 == 0 && cnt2 == 0, "decays to zero");
    $display("saturations high=%0d low=%0d, cancelled pulse pairs=%0d", sat_hi, sat_lo, cancels);
    check(sat_hi > 0, "upper saturation seen");
    check(sat_lo > 0, "lower saturation seen");
    check(cancels > 0, "up/down cancellation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
