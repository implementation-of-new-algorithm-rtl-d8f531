// edbns_encoder: coefficient to tap-control encoder.
//
// Converts a signed COEF_W-bit coefficient into the control of one tap.
// |c| is split as 2^e * f with f odd (e = number of trailing zeros); f
// addresses edbns_lut, which returns the term selects and signs of f, and e
// becomes the tap's even-factor shift. A negative coefficient uses the same
// word with every term sign inverted; c = 0 disables all terms. Storing only
// fundamentals and deriving e follows the filter's LUT organisation; deriving
// e and the sign with logic (rather than storing them) is this design's choice.
//
// Purely combinational: coef in, ctrl out in the same cycle. Bit 0 of the
// fundamental (always 1) and its top bit (always 0) are not read, which is why
// a linter reports those bits of fund as unused.
module edbns_encoder (
  input  logic signed [edbns_pkg::COEF_W-1:0] coef,
  output edbns_pkg::tap_ctrl_t                ctrl
);
  import edbns_pkg::*;

  logic [COEF_W-1:0] mag, fund;
  logic [ESH_W-1:0]  e;
  term_vec_t         word;

  assign mag = coef[COEF_W-1] ? COEF_W'(-coef) : COEF_W'(coef);

  always_comb begin
    e = '0;
    for (int i = COEF_W-1; i >= 0; i--)
      if (mag[i]) e = ESH_W'(i);
  end

  assign fund = mag >> e;

  edbns_lut u_lut (.addr(fund[LUT_AW:1]), .word(word));

  always_comb begin
    ctrl.esh  = e;
    ctrl.term = word;
    for (int t = 0; t < T; t++) begin
      if (mag == '0) ctrl.term[t].en = 1'b0;
      ctrl.term[t].neg = word[t].neg ^ coef[COEF_W-1];
    end
  end
endmodule
