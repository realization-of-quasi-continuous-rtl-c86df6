// Self-checking testbench of udc_rm_pair at N = 6 and at the full width.
//
// Random up/down/idle requests and random coefficient pulses drive both
// pairs; every clock the count, the output pulse and the overflow flag are
// compared with the behavioural counter and rate-multiplier models. The
// requests drift up and down in long phases, so the counts sweep their range
// and both rails are hit. Finally the count is frozen and the output must
// carry exactly CNT pulses in 2^N coefficient pulses.
module udc_rm_pair_tb;
  import qcdf_pkg::*;
  import qcdf_ref_pkg::*;
  localparam int unsigned NS = 6;
  localparam int unsigned NL = QCDF_BITS;

  logic clk = 0, rst_n = 0, coef = 0;
  udc_ctl_t ctl;
  logic [NS-1:0] cnt_s;
  logic [NL-1:0] cnt_l;
  logic out_s, out_l, ovf_s, ovf_l;
  int checks = 0, failures = 0;

  udc_rm_pair #(.N(NS)) dut_s (.clk, .rst_n, .ctl, .coef, .cnt(cnt_s), .pulse_out(out_s), .ovf(ovf_s));
  udc_rm_pair           dut_l (.clk, .rst_n, .ctl, .coef, .cnt(cnt_l), .pulse_out(out_l), .ovf(ovf_l));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    automatic udc_model us = new(NS), ul = new(NL);
    automatic rm_model  rs = new(NS), rl = new(NL);
    automatic int sat = 0, pulses_s = 0, pulses_l = 0, seen = 0;
    ctl = '0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int t = 0; t < 100000; t++) begin
      int net, r;
      bit es, el, ss, sl;
      r = $urandom_range(0, 99);
      if ((t / 8000) % 2 == 0) net = (r < 55) ? 1 : (r < 75) ? -1 : 0;
      else                     net = (r < 55) ? -1 : (r < 75) ? 1 : 0;
      ctl.ci = (net != 0); ctl.sub = (net < 0);
      coef = ($urandom_range(0, 1) != 0);
      #1;
      check(cnt_s == NS'(us.cnt) && cnt_l == NL'(ul.cnt), $sformatf("t=%0d cnt", t));
      es = rs.step(coef, us.cnt); el = rl.step(coef, ul.cnt);
      check(out_s == es && out_l == el, $sformatf("t=%0d pulse", t));
      ss = us.step(net); sl = ul.step(net);
      check(ovf_s == ss && ovf_l == sl, $sformatf("t=%0d ovf", t));
      if (ss) sat++;
      @(negedge clk);
    end
    check(sat > 0, "saturation seen");
    // frozen count: exactly CNT pulses per 2^N coefficient pulses
    ctl = '0;
    while (seen < (1 << NL)) begin
      coef = ($urandom_range(0, 3) != 0);
      #1;
      if (out_l) pulses_l++;
      if (out_s && seen < (1 << NS)) pulses_s++;
      if (coef) seen++;
      @(negedge clk);
    end
    coef = 0;
    check(pulses_l == int'(cnt_l), $sformatf("rate N=%0d: %0d pulses for cnt %0d", NL, pulses_l, cnt_l));
    check(pulses_s == int'(cnt_s), $sformatf("rate N=%0d: %0d pulses for cnt %0d", NS, pulses_s, cnt_s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
