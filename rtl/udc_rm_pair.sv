// Operator pair: an up-down counter abutted to its rate multiplier.
//
// This is the unit the filters are tiled from: N UDC slices on top of N RM
// slices, the counter bits CNT running straight down into the multiplier.
// The pair integrates the pulses presented as {ci, sub} by the intermediate
// slice in front of it and emits the PFM state variable
// pulse_out = coef-rate * CNT / 2^N. The counter saturates (ovf) at 0 and at
// 2^N-1.
//
// Timing: cnt is registered; pulse_out is combinational from coef and the
// registered count, so a pair's output can feed any counter (its own
// included) without a combinational loop. Abutting the two operators follows
// the layout of the integrated filter; as a module boundary it is this
// design's choice.
module udc_rm_pair
  import qcdf_pkg::*;
#(
  parameter int unsigned N = QCDF_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  udc_ctl_t     ctl,        // from the intermediate slice
  input  logic         coef,       // filter coefficient pulse
  output logic [N-1:0] cnt,        // state variable, bit-parallel
  output logic         pulse_out,  // state variable, PFM
  output logic         ovf         // counter refuses a step this clock
);

  udc #(.N(N)) u_udc (
    .clk(clk), .rst_n(rst_n), .ctl(ctl), .cnt(cnt), .ovf(ovf)
  );

  rm #(.N(N)) u_rm (
    .clk(clk), .rst_n(rst_n), .coef(coef), .cnt(cnt), .pulse_out(pulse_out),
    .int_val()
  );

endmodule
