// One bit slice of the saturating up-down counter.
//
// The slice holds one counter bit and the ripple-carry logic of an
// incrementer/decrementer. Its carry (borrow when sub=1) enters at ci from
// the next less significant slice and leaves at co towards the next more
// significant one; the slices of an n-bit counter are simply abutted. The
// carry out of the MSB slice is the counter's overflow flag ovf, which is
// returned to every slice: while it is set the register keeps its value, so
// counting past all-ones or below zero saturates instead of wrapping.
//
// Timing: ci, sub and ovf are combinational; the bit is registered on the
// rising clock edge and cleared by the synchronous active-low reset rst_n. The
// original slice stores its bit in a register driven by two non-overlapping
// clock phases; a single edge-triggered flip-flop stands in for it here.
module udc_slice (
  input  logic clk,
  input  logic rst_n,
  input  logic ci,    // carry/borrow in from the less significant slice
  input  logic sub,   // 1: decrement, 0: increment
  input  logic ovf,   // carry out of the MSB slice: hold the register
  output logic co,    // carry/borrow out to the more significant slice
  output logic q      // counter bit (CNT)
);

  logic d;

  // Incrementer/decrementer: toggle when a carry arrives; a carry passes on
  // through a 1 when counting up and through a 0 when counting down.
  always_comb begin
    d  = q ^ ci;
    co = ci & (sub ? ~q : q);
  end

  // Register with saturation: no update while the counter would overflow.
  always_ff @(posedge clk) begin
    if (!rst_n)   q <= 1'b0;
    else if (!ovf) q <= d;
  end

endmodule
