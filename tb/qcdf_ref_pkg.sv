// Reference models for the QCDF testbenches, written at the behavioural
// level (integers, no bit slices): a saturating unsigned counter and a rate
// multiplier that compares its input with the bit-reversed count of the
// coefficient pulses seen so far. Each step() returns what the hardware should
// show in the current clock and then advances the model by one clock.
package qcdf_ref_pkg;

  function automatic int unsigned bitrev(int unsigned v, int unsigned n);
    int unsigned r = 0;
    for (int unsigned i = 0; i < n; i++) if (v[i]) r |= (1 << (n - 1 - i));
    return r;
  endfunction

  class udc_model;
    int unsigned n, cnt, maxv;
    function new(int unsigned n_bits);
      n = n_bits; cnt = 0; maxv = (1 << n_bits) - 1;
    endfunction
    // Net request +1, 0 or -1; returns 1 when the request is refused.
    function bit step(int net);
      bit sat = 0;
      if (net > 0) begin
        if (cnt == maxv) sat = 1; else cnt++;
      end else if (net < 0) begin
        if (cnt == 0) sat = 1; else cnt--;
      end
      return sat;
    endfunction
  endclass

  class rm_model;
    int unsigned n, ctr;
    function new(int unsigned n_bits);
      n = n_bits; ctr = 0;
    endfunction
    function int unsigned int_value();
      return bitrev(ctr, n);
    endfunction
    function bit step(bit coef, int unsigned cnt);
      bit out = coef && (cnt > bitrev(ctr, n));
      if (coef) ctr = (ctr + 1) % (1 << n);
      return out;
    endfunction
  endclass

endpackage
