// Self-checking testbench of rm_slice: checks the comparator stage
// (greater-than with ripple from the less significant bits) and the
// incrementer stage for every input combination and both stored bits, and
// that the counter bit only moves on a coefficient pulse.
module rm_slice_tb;
  logic clk = 0, rst_n = 0, adv = 0, cnt_bit = 0, cmp_ci = 0, inc_ci = 0;
  logic cmp_co, inc_co, int_bit;
  int checks = 0, failures = 0;

  rm_slice dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      bit b0, cb, cc, ic, a, exp_gt;
      {b0, cb, cc, ic, a} = 5'(v);
      @(negedge clk); rst_n = 0; adv = 0; inc_ci = 0;
      @(negedge clk); rst_n = 1;
      if (b0) begin adv = 1; inc_ci = 1; @(negedge clk); adv = 0; inc_ci = 0; end
      check(int_bit == b0, "setup");
      cnt_bit = cb; cmp_ci = cc; inc_ci = ic; adv = a;
      #1;
      // greater if this bit says so, or equal here and greater below
      exp_gt = (cb > b0) || ((cb == b0) && cc);
      check(cmp_co == exp_gt, $sformatf("cmp cnt=%0b int=%0b ci=%0b", cb, b0, cc));
      check(inc_co == (b0 && ic), "inc carry");
      @(negedge clk);
      check(int_bit == (a ? (b0 ^ ic) : b0), $sformatf("reg adv=%0b ci=%0b", a, ic));
      adv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
