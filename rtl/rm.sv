// N-bit rate multiplier (RM): weights a bit-parallel value by a pulse rate.
//
// The RM converts its bit-parallel input CNT back into a PFM pulse stream
// whose rate is f_coef * CNT / 2^N. Every filter coefficient pulse advances
// an internal free-running N-bit counter; the counter is read bit-reversed as
// INT, and the RM emits an output pulse in a coefficient-pulse cycle when
// CNT > INT. Over any 2^N consecutive coefficient pulses INT takes every
// value once, so exactly CNT output pulses are produced, spread out evenly as
// in ordered dithering. The block is N abutted rm_slice instances: the
// comparator chain starts with carry-in 0 at the CNT LSB slice and its carry
// out at the MSB slice is the RM output; the incrementer chain starts with
// carry-in 1 at the slice holding the counter LSB.
//
// Interface: coef is the coefficient pulse (one clock wide per pulse), cnt
// the value to weight, pulse_out the PFM output, int_val the current INT.
// The carry out of the last incrementer stage (counter wrap) is not used.
// Timing: pulse_out is combinational from coef, cnt and the internal
// counter (compared before the counter advances); it is only ever high
// together with coef. Gating the
// comparator result with the coefficient pulse is this design's reading of
// "sends out a pulse".
module rm
  import qcdf_pkg::*;
#(
  parameter int unsigned N = QCDF_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         coef,
  input  logic [N-1:0] cnt,
  output logic         pulse_out,
  output logic [N-1:0] int_val     // INT, for observation
);

  logic [N:0]   cmp_c;  // comparator chain, CNT LSB -> MSB
  logic [N:0]   inc_c;  // incrementer chain, indexed by counter bit

  assign cmp_c[0] = 1'b0;
  assign inc_c[0] = 1'b1;

  for (genvar i = 0; i < N; i++) begin : g_slice
    // Slice i holds internal counter bit k = N-1-i.
    localparam int unsigned K = N - 1 - i;
    rm_slice u_slice (
      .clk    (clk),
      .rst_n  (rst_n),
      .adv    (coef),
      .cnt_bit(cnt[i]),
      .cmp_ci (cmp_c[i]),
      .cmp_co (cmp_c[i+1]),
      .inc_ci (inc_c[K]),
      .inc_co (inc_c[K+1]),
      .int_bit(int_val[i])
    );
  end

  assign pulse_out = coef & cmp_c[N];

endmodule
