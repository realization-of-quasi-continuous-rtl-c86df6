// One bit slice of the rate multiplier.
//
// A slice carries three things stacked on one bit position i of the RM input
// CNT: a stage of the magnitude comparator CNT > INT, one bit of the internal
// free-running counter, and a stage of that counter's incrementer. The
// internal counter is stored bit-reversed: slice i holds counter bit N-1-i,
// which is read as bit i of INT. Hence the incrementer carry runs the other
// way from the comparator: the comparator ripples from the CNT LSB slice to
// the CNT MSB slice, the incrementer from the slice holding the counter LSB
// (the CNT MSB slice) towards the CNT LSB slice.
//
// Timing: the comparator and incrementer are combinational; the counter bit
// is loaded on the rising clock edge of a cycle in which the filter
// coefficient pulse adv is high. In the original slice the coefficient pulse
// is itself one of the register's clock phases; here it is a clock enable.
module rm_slice (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,      // filter coefficient pulse: advance the counter
  input  logic cnt_bit,  // bit i of the RM input CNT
  input  logic cmp_ci,   // "greater so far" from the less significant bits
  output logic cmp_co,   // "greater so far" including this bit
  input  logic inc_ci,   // incrementer carry in
  output logic inc_co,   // incrementer carry out
  output logic int_bit   // bit i of INT (bit N-1-i of the internal counter)
);

  logic d;

  always_comb begin
    // A more significant bit decides; equal bits pass the lower verdict on.
    cmp_co = (cnt_bit & ~int_bit) | (~(cnt_bit ^ int_bit) & cmp_ci);
    d      = int_bit ^ inc_ci;
    inc_co = int_bit & inc_ci;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)   int_bit <= 1'b0;
    else if (adv) int_bit <= d;
  end

endmodule
