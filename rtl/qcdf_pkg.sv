// Shared constants and types of the quasi-continuous digital filter (QCDF).
//
// A QCDF carries its state variables in two forms: bit-parallel numbers held
// in up-down counters (UDC), and pulse-frequency-modulated (PFM) single-wire
// pulse trains produced by rate multipliers (RM). QCDF_BITS is the operator
// width n of the integrated third-order filter (11 bits). The control pair
// udc_ctl_t is what an intermediate slice hands to the LSB slice of a counter:
// ci is the carry-in (count this clock) and sub selects down-counting. The
// ci/sub names follow the counter bit slice; bundling them is this design's
// choice.
package qcdf_pkg;

  parameter int unsigned QCDF_BITS = 11;

  typedef struct packed {
    logic ci;   // count one step this clock
    logic sub;  // 1: decrement, 0: increment
  } udc_ctl_t;

endpackage
