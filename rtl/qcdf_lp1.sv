// First-order lowpass QCDF.
//
// The simplest QCDF: one operator pair (udc_rm_pair). Its up-down counter
// integrates the input pulse stream fx minus its own rate-multiplier output
// fy, and the rate multiplier weights the count by the coefficient pulse
// rate f1. In the mean,
// d(cnt)/dt = fx - f1*cnt/2^N and fy = f1*cnt/2^N: a first-order lowpass
// with time constant 2^N/f1 clocks-of-f1 and unity gain from fx to fy. The
// output exists in both forms: bit-parallel (y, the counter) and PFM (fy).
//
// Interface: fx, f1 are one-clock pulses on the system clock; fy is a
// one-clock pulse, combinational from f1 and the registered count; y is
// registered. The structure follows the first-order example of the filter
// family; the width default equal to the third-order filter's is a choice.
module qcdf_lp1
  import qcdf_pkg::*;
#(
  parameter int unsigned N = QCDF_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fx,   // PFM input
  input  logic         f1,   // coefficient pulse
  output logic         fy,   // PFM output
  output logic [N-1:0] y,    // bit-parallel output (the state variable)
  output logic         ovf   // counter saturating this clock
);

  udc_ctl_t ctl;

  leapfrog_link u_link (
    .clk(clk), .rst_n(rst_n),
    .plus(fx), .minus_a(fy), .minus_b(1'b0),
    .ctl(ctl)
  );

  udc_rm_pair #(.N(N)) u_pair (
    .clk(clk), .rst_n(rst_n), .ctl(ctl), .coef(f1),
    .cnt(y), .pulse_out(fy), .ovf(ovf)
  );

endmodule
