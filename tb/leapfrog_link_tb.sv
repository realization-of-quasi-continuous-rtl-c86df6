// Self-checking testbench of leapfrog_link: every allowed combination of one
// up and at most one down pulse must give the net step (+1, 0 or -1) as a
// counter carry-in and direction.
module leapfrog_link_tb;
  import qcdf_pkg::*;
  logic clk = 0, rst_n = 0, plus = 0, minus_a = 0, minus_b = 0;
  udc_ctl_t ctl;
  int checks = 0, failures = 0;

  leapfrog_link dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int v = 0; v < 8; v++) begin
      int net;
      {plus, minus_a, minus_b} = 3'(v);
      if (minus_a && minus_b) continue;
      @(negedge clk);
      net = int'(plus) - int'(minus_a) - int'(minus_b);
      checks++;
      if (ctl.ci != (net != 0) || (net != 0 && ctl.sub != (net < 0))) begin
        failures++;
        $display("FAIL plus=%0b minus_a=%0b minus_b=%0b ci=%0b sub=%0b",
                 plus, minus_a, minus_b, ctl.ci, ctl.sub);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
