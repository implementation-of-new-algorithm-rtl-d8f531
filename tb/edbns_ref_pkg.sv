// edbns_ref_pkg: reference arithmetic for the EDBNS testbenches.
//
// Evaluates a term or tap control word back into the integer it encodes,
// term by term (+/- 2^shift * 3^power), with plain integer arithmetic, so that
// testbenches can compare the hardware against the number it should multiply by.
package edbns_ref_pkg;
  import edbns_pkg::*;

  function automatic int pow3(int unsigned k);
    int r = 1;
    for (int unsigned i = 0; i < k; i++) r = r * 3;
    return r;
  endfunction

  // value of the odd fundamental described by a LUT word
  function automatic int word_value(term_vec_t w);
    int v = 0;
    for (int t = 0; t < T; t++) begin
      int term;
      term = pow3(POBS_MAP[t][w[t].bsel]) * (1 << SHIFT_MAP[t][w[t].asel]);
      if (w[t].en) v = w[t].neg ? v - term : v + term;
    end
    return v;
  endfunction

  // coefficient described by a tap control word
  function automatic int ctrl_value(tap_ctrl_t c);
    return word_value(c.term) * (1 << c.esh);
  endfunction

  function automatic int n_terms(term_vec_t w);
    int n = 0;
    for (int t = 0; t < T; t++) if (w[t].en) n++;
    return n;
  endfunction
endpackage
