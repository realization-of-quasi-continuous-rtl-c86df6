// Self-checking testbench of udc: random up/down/idle requests, biased so
// that the count drifts to both rails, compared each clock with a saturating
// reference counter, for a 4-bit counter and a full-width (11-bit) one. Also
// checks one step per clock (the count moves on the edge after a request)
// and that the overflow flag rises exactly when a step is refused.
module udc_tb;
  import qcdf_pkg::*;
  import qcdf_ref_pkg::*;
  localparam int unsigned NS = 4;
  localparam int unsigned NL = QCDF_BITS;

  logic clk = 0, rst_n = 0;
  udc_ctl_t ctl;
  logic [NS-1:0] cnt_s;
  logic [NL-1:0] cnt_l;
  logic ovf_s, ovf_l;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;
  int unsigned max_l = 0;

  udc #(.N(NS)) dut_s (.clk, .rst_n, .ctl, .cnt(cnt_s), .ovf(ovf_s));
  udc           dut_l (.clk, .rst_n, .ctl, .cnt(cnt_l), .ovf(ovf_l));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    automatic udc_model ms = new(NS), ml = new(NL);
    ctl = '0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60000; t++) begin
      int net, r;
      bit ss, sl;
      r = $urandom_range(0, 99);
      // phases of upward and downward drift
      if ((t / 6000) % 2 == 0) net = (r < 60) ? 1 : (r < 80) ? -1 : 0;
      else                     net = (r < 60) ? -1 : (r < 80) ? 1 : 0;
      ctl.ci = (net != 0); ctl.sub = (net < 0);
      #1;
      check(cnt_s == NS'(ms.cnt) && cnt_l == NL'(ml.cnt),
            $sformatf("t=%0d cnt %0d/%0d exp %0d/%0d", t, cnt_s, cnt_l, ms.cnt, ml.cnt));
      ss = ms.step(net); sl = ml.step(net);
      check(ovf_s == ss && ovf_l == sl, $sformatf("t=%0d ovf", t));
      if (ml.cnt > max_l) max_l = ml.cnt;
      if (ss && net > 0) sat_hi++;
      if (ss && net < 0) sat_lo++;
      @(negedge clk);
    end
    check(sat_hi > 0 && sat_lo > 0, "both rails reached");
    check(max_l > 100, "wide counter moved");
    $display("saturations high=%0d low=%0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
