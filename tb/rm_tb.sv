// Self-checking testbench of rm: for a 5-bit multiplier every input value,
// and for the full 11-bit one a set of values, is held for exactly 2^N
// coefficient pulses, issued with random gaps. The output must give exactly
// CNT pulses in that window (rate f_coef*CNT/2^N), only in coefficient-pulse
// cycles, and match a behavioural bit-reversed-counter model in every clock.
module rm_tb;
  import qcdf_pkg::*;
  import qcdf_ref_pkg::*;
  localparam int unsigned NS = 5;
  localparam int unsigned NL = QCDF_BITS;

  logic clk = 0, rst_n = 0, coef_s = 0, coef_l = 0;
  logic [NS-1:0] cnt_s, int_s;
  logic [NL-1:0] cnt_l, int_l;
  logic out_s, out_l;
  int checks = 0, failures = 0;

  rm #(.N(NS)) dut_s (.clk, .rst_n, .coef(coef_s), .cnt(cnt_s), .pulse_out(out_s), .int_val(int_s));
  rm           dut_l (.clk, .rst_n, .coef(coef_l), .cnt(cnt_l), .pulse_out(out_l), .int_val(int_l));

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

  // Hold cnt for 2^n coefficient pulses; return the number of output pulses.
  task automatic window(rm_model m, int unsigned n, int unsigned value, bit wide,
                        output int unsigned pulses);
    int unsigned seen = 0;
    pulses = 0;
    if (wide) cnt_l = NL'(value); else cnt_s = NS'(value);
    while (seen < (1 << n)) begin
      bit exp_out, got, coef;
      coef = ($urandom_range(0, 2) != 0);
      coef_s = coef && !wide;
      coef_l = coef && wide;
      #1;
      if (wide) begin
        check(int_l == NL'(m.int_value()), "int_val wide");
        got = out_l;
      end else begin
        check(int_s == NS'(m.int_value()), "int_val small");
        got = out_s;
      end
      exp_out = m.step(coef, value);
      check(got == exp_out, $sformatf("pulse n=%0d cnt=%0d", n, value));
      if (got && !coef) check(0, "pulse without coefficient");
      if (got) pulses++;
      if (coef) seen++;
      @(negedge clk);
    end
    coef_s = 0; coef_l = 0;
  endtask

  initial begin
    automatic rm_model ms = new(NS), ml = new(NL);
    int unsigned p;
    cnt_s = 0; cnt_l = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int unsigned v = 0; v < (1 << NS); v++) begin
      window(ms, NS, v, 0, p);
      check(p == v, $sformatf("rate n=%0d cnt=%0d got %0d pulses", NS, v, p));
    end
    for (int k = 0; k < 6; k++) begin
      int unsigned v;
      case (k)
        0: v = 0; 1: v = 1; 2: v = (1 << NL) - 1; 3: v = 1 << (NL - 1);
        default: v = $urandom_range(2, (1 << NL) - 2);
      endcase
      window(ml, NL, v, 1, p);
      check(p == v, $sformatf("rate n=%0d cnt=%0d got %0d pulses", NL, v, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
