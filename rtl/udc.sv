// N-bit saturating up-down counter (UDC), the integrator of a QCDF.
//
// The counter turns a PFM pulse stream into a bit-parallel number by counting
// the pulses: each clock with ctl.ci set moves it one step, up or down
// according to ctl.sub. It is built, like the integrated operator, from N
// abutted udc_slice instances with a ripple carry from LSB to MSB. The carry
// out of the MSB slice is the overflow condition ovf; it is fed back to all
// slices, which then hold their bits, so the unsigned count saturates at 0
// and at 2^N-1.
//
// Interface: ctl comes from an intermediate slice (leapfrog_link); cnt is the
// registered state variable; ovf is combinational and is high in a cycle in
// which a requested step is refused. Timing: one step per clock, cnt is
// updated on the rising edge after the request.
module udc
  import qcdf_pkg::*;
#(
  parameter int unsigned N = QCDF_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  udc_ctl_t     ctl,
  output logic [N-1:0] cnt,
  output logic         ovf
);

  logic [N:0] carry;

  assign carry[0] = ctl.ci;
  assign ovf      = carry[N];

  for (genvar i = 0; i < N; i++) begin : g_slice
    udc_slice u_slice (
      .clk  (clk),
      .rst_n(rst_n),
      .ci   (carry[i]),
      .sub  (ctl.sub),
      .ovf  (ovf),
      .co   (carry[i+1]),
      .q    (cnt[i])
    );
  end

endmodule
