// Intermediate slice: merges the PFM pulses that act on one up-down counter.
//
// In a leap-frog QCDF each counter integrates the difference of pulse
// streams: one stream counted up (the filter input or the previous RM) and
// one or two streams counted down (its own or the following RM outputs). The
// slice sits between operator pairs, routes those pulse wires to the counter
// and reduces the pulses present in a clock to the counter's carry-in and
// subtract controls: an up pulse alone increments, a down pulse alone
// decrements, an up and a down pulse together cancel.
//
// Interface: plus, minus_a, minus_b are one-clock pulses; ctl drives the
// counter's LSB slice combinationally. A counter moves by at most one step per
// clock, so two down pulses in the same clock cannot both be counted: the
// coefficient pulse trains must be interleaved so that this never happens,
// which the assertion checks. That rule, and this gate-level reduction, are
// this design's choices; the original only says that the clock must be fast
// enough to process every pulse.
module leapfrog_link
  import qcdf_pkg::*;
(
  input  logic     clk,      // for the assertion only
  input  logic     rst_n,    // for the assertion only
  input  logic     plus,
  input  logic     minus_a,
  input  logic     minus_b,
  output udc_ctl_t ctl
);

  logic minus;

  always_comb begin
    minus   = minus_a | minus_b;
    ctl.ci  = plus ^ minus;
    ctl.sub = minus & ~plus;
  end

  a_single_down : assert property (@(posedge clk) disable iff (!rst_n)
    !(minus_a && minus_b))
    else $error("leapfrog_link: two down pulses in one clock, one is lost");

endmodule
