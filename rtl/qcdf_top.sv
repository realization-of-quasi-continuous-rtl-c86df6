// Top level: the third-order QCDF and, beside it, the first-order QCDF.
//
// lp3_* is the integrated third-order leap-frog Butterworth lowpass
// (qcdf_lp3, N = 11 bits by default); lp1_* is the independent first-order
// lowpass (qcdf_lp1). The two share only the system clock and reset. The
// coefficient pulse trains are inputs: the filter family allows them to be
// derived from the system clock or generated externally, and this top leaves
// that to the surrounding system. See qcdf_lp3 and qcdf_lp1 for the timing.
module qcdf_top
  import qcdf_pkg::*;
#(
  parameter int unsigned N = QCDF_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  // third-order filter
  input  logic         lp3_fx,
  input  logic         lp3_f1,
  input  logic         lp3_f2,
  input  logic         lp3_f3,
  output logic         lp3_fy,
  output logic [N-1:0] lp3_y,
  output logic [N-1:0] lp3_cnt1,
  output logic [N-1:0] lp3_cnt2,
  output logic [2:0]   lp3_ovf,
  // first-order filter
  input  logic         lp1_fx,
  input  logic         lp1_f1,
  output logic         lp1_fy,
  output logic [N-1:0] lp1_y,
  output logic         lp1_ovf
);

  qcdf_lp3 #(.N(N)) u_lp3 (
    .clk(clk), .rst_n(rst_n),
    .fx(lp3_fx), .f1(lp3_f1), .f2(lp3_f2), .f3(lp3_f3),
    .fy(lp3_fy), .y(lp3_y), .cnt1(lp3_cnt1), .cnt2(lp3_cnt2), .ovf(lp3_ovf)
  );

  qcdf_lp1 #(.N(N)) u_lp1 (
    .clk(clk), .rst_n(rst_n),
    .fx(lp1_fx), .f1(lp1_f1),
    .fy(lp1_fy), .y(lp1_y), .ovf(lp1_ovf)
  );

endmodule
