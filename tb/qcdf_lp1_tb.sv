// Self-checking testbench of qcdf_lp1 at N = 8.
//
// fx and f1 are pulse trains from two phase accumulators (f1 at half the
// clock rate, so the time constant is 2^N/0.5 = 512 clocks). Every clock the
// count, output pulse and saturation flag are compared with a cycle-exact
// model. On the response: after one time constant the count has reached
// 1 - 1/e of its final value, it settles at 2^N * fx/f1, the output pulse
// rate equals the input rate (pulses in minus pulses out equals the change
// of the count, exactly), and a full-rate input (fx > f1) saturates the
// counter.
module qcdf_lp1_tb;
  import qcdf_ref_pkg::*;
  localparam int unsigned N = 8;
  localparam real FS = real'(1 << N);

  logic clk = 0, rst_n = 0, fx = 0, f1 = 0;
  logic fy, ovf;
  logic [N-1:0] y;
  int checks = 0, failures = 0;

  qcdf_lp1 #(.N(N)) dut (.*);

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

  udc_model u;
  rm_model  r;
  int unsigned acc_x = 0, acc_c = 0, t = 0;
  int n_in = 0, n_out = 0, sat = 0;

  task automatic run(int unsigned rate16, int unsigned cycles);
    repeat (cycles) begin
      bit p, s;
      acc_x += rate16; fx = acc_x[16]; acc_x[16] = 1'b0;
      acc_c += 32768;  f1 = acc_c[16]; acc_c[16] = 1'b0;
      #1;
      check(y == N'(u.cnt), $sformatf("t=%0d y=%0d exp %0d", t, y, u.cnt));
      p = r.step(f1, u.cnt);
      check(fy == p, $sformatf("t=%0d fy", t));
      s = u.step(int'(fx) - int'(p));
      check(ovf == s, $sformatf("t=%0d ovf", t));
      if (s) sat++;
      n_in += int'(fx); n_out += int'(p);
      t++;
      @(negedge clk);
    end
  endtask

  initial begin
    real fin;
    int y0;
    u = new(N); r = new(N);
    @(negedge clk); @(negedge clk); rst_n = 1;
    fin = FS * 0.3 / 0.5;
    run(19661, 512);                       // one time constant
    $display("after tau: y=%0d expected %0.1f", y, fin * 0.632);
    check(real'(y) > fin * 0.58 && real'(y) < fin * 0.69, "exponential rise");
    run(19661, 8000);
    $display("settled: y=%0d expected %0.1f", y, fin);
    check(real'(y) > fin * 0.97 && real'(y) < fin * 1.03, "final value");
    y0 = int'(y); n_in = 0; n_out = 0;
    run(19661, 10000);
    check(n_in - n_out == int'(y) - y0, "pulse conservation");
    check(n_out > 2900 && n_out < 3100, $sformatf("output rate %0d/10000", n_out));
    check(sat == 0, "no saturation below f1");
    run(65535, 4000);                      // fx above f1: counter saturates
    check(sat > 0 && y == N'((1 << N) - 1), "upper saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
