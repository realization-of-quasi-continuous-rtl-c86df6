// Third-order all-pole leap-frog lowpass QCDF (Butterworth example).
//
// The filter simulates the signal flowgraph of a doubly terminated LC ladder
// (R - C1 - L2 - C3 - R). Each reactive element becomes an integrator, i.e.
// an up-down counter (UDC) followed by a rate multiplier (RM), together one
// operator pair (udc_rm_pair); the RM's coefficient pulse rate f_k plays the
// role of 1/C or 1/L. The RM outputs
// p1, p2, p3 are the PFM state variables, and intermediate slices route them
// to the neighbouring counters:
//   UDC1 (C1): up on fx, down on p1 and p2
//   UDC2 (L2): up on p1, down on p3
//   UDC3 (C3): up on p2, down on p3
// so that in the mean d(cnt_k)/dt is the ladder's node equation and the
// output fy = p3 settles at fx/2 (the ladder's DC gain). For the Butterworth
// response the coefficient rates are f1 : f2 : f3 = 1 : 1/2 : 1, and the
// cutoff frequency scales with them, not with the system clock.
//
// Arithmetic is unsigned and saturating, as in the counters. Interface: all
// pulse inputs are one clock wide on the system clock. A counter takes one
// step per clock, and UDC1 is the only counter with two down inputs (p1 and
// p2), so f1 and f2 must never pulse in the same clock; f3 and fx may pulse
// in any clock. With f1 = f3 in two of every three clocks and f2 in the
// third, the fastest Butterworth setting is f1 = 2/3 of the clock rate.
// fy is combinational from f3 and cnt3, the counts are registered, ovf[k]
// flags counter k+1 refusing a step.
module qcdf_lp3
  import qcdf_pkg::*;
#(
  parameter int unsigned N = QCDF_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fx,     // PFM input
  input  logic         f1,     // coefficient pulses
  input  logic         f2,
  input  logic         f3,
  output logic         fy,     // PFM output (p3)
  output logic [N-1:0] y,      // bit-parallel output (cnt3)
  output logic [N-1:0] cnt1,   // state variable of C1
  output logic [N-1:0] cnt2,   // state variable of L2
  output logic [2:0]   ovf     // saturation flags of UDC1..UDC3
);

  logic     p1, p2, p3;
  udc_ctl_t ctl1, ctl2, ctl3;

  leapfrog_link u_link1 (.clk(clk), .rst_n(rst_n),
    .plus(fx), .minus_a(p1), .minus_b(p2), .ctl(ctl1));
  leapfrog_link u_link2 (.clk(clk), .rst_n(rst_n),
    .plus(p1), .minus_a(p3), .minus_b(1'b0), .ctl(ctl2));
  leapfrog_link u_link3 (.clk(clk), .rst_n(rst_n),
    .plus(p2), .minus_a(p3), .minus_b(1'b0), .ctl(ctl3));

  udc_rm_pair #(.N(N)) u_pair1 (.clk(clk), .rst_n(rst_n), .ctl(ctl1), .coef(f1),
    .cnt(cnt1), .pulse_out(p1), .ovf(ovf[0]));
  udc_rm_pair #(.N(N)) u_pair2 (.clk(clk), .rst_n(rst_n), .ctl(ctl2), .coef(f2),
    .cnt(cnt2), .pulse_out(p2), .ovf(ovf[1]));
  udc_rm_pair #(.N(N)) u_pair3 (.clk(clk), .rst_n(rst_n), .ctl(ctl3), .coef(f3),
    .cnt(y),    .pulse_out(p3), .ovf(ovf[2]));

  assign fy = p3;

  a_coef_interleaved : assert property (@(posedge clk) disable iff (!rst_n)
    !(f1 && f2))
    else $error("qcdf_lp3: f1 and f2 pulses coincide");

endmodule
