// Self-checking testbench of udc_slice: walks every combination of stored
// bit, carry in, direction and overflow, checks the combinational carry out
// against the increment/decrement truth table and the registered bit against
// "toggle on carry unless overflow".
module udc_slice_tb;
  logic clk = 0, rst_n = 0, ci = 0, sub = 0, ovf = 0;
  logic co, q;
  int checks = 0, failures = 0;

  udc_slice dut (.*);

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
    for (int v = 0; v < 16; v++) begin
      bit q0, c, s, o, exp_co, exp_q;
      {q0, c, s, o} = 4'(v);
      // bring the register to q0: reset, then one increment if needed
      @(negedge clk); rst_n = 0; ci = 0; sub = 0; ovf = 0;
      @(negedge clk); rst_n = 1;
      if (q0) begin ci = 1; @(negedge clk); ci = 0; end
      check(q == q0, $sformatf("setup q=%0b", q0));
      ci = c; sub = s; ovf = o;
      #1;
      exp_co = s ? (c && !q0) : (c && q0);
      check(co == exp_co, $sformatf("co q=%0b ci=%0b sub=%0b", q0, c, s));
      @(negedge clk);
      exp_q = o ? q0 : (q0 != c);
      check(q == exp_q, $sformatf("q q=%0b ci=%0b sub=%0b ovf=%0b", q0, c, s, o));
    end
    // reset clears a set bit
    ci = 1; sub = 0; ovf = 0; @(negedge clk); ci = 0;
    rst_n = 0; @(negedge clk);
    check(q == 0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
