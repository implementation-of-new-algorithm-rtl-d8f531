// dbcg: double base coefficient generator of one filter tap.
//
// Turns the T multiples of x chosen by the tap's POBS into the product c*x.
// Term t is shifted by a hardwired amount picked from SHIFT_MAP[t] by a
// multiplexer (the programmable shifter is a multiplexer over a few fixed
// shifts), then kept, negated or dropped according to its en/neg bits. The
// three terms are reduced by one 3:2 carry-save layer and a final adder, and
// the sum (the fundamental times x) is shifted left by the even factor esh.
//
// Width: the result is signed OW = DW + COEF_W bits. The terms themselves can
// be wider (up to 81 * 2^7 * x) but their sum is exactly f * x, which fits in
// OW bits, so all arithmetic is done modulo 2^OW without loss. Purely
// combinational.
module dbcg #(
  parameter int unsigned DW = 8,
  parameter int unsigned PW = DW + edbns_pkg::POW_GROWTH,
  parameter int unsigned OW = DW + edbns_pkg::COEF_W
) (
  input  logic signed [PW-1:0]   m [edbns_pkg::T],
  input  edbns_pkg::tap_ctrl_t   ctrl,
  output logic signed [OW-1:0]   prod
);
  import edbns_pkg::*;

  logic [OW-1:0] term [T];
  logic [OW-1:0] csa_s, csa_c, fund_x;

  initial begin
    assert (T == 3) else $error("dbcg: the carry-save layer is written for three terms");
  end

  for (genvar t = 0; t < T; t++) begin : g_term
    logic [OW-1:0] ext, shifted;
    assign ext = OW'(m[t]);                       // sign extension
    always_comb begin
      shifted = ext << SHIFT_MAP[t][0];
      for (int i = 1; i < N_ASEL; i++)
        if (ctrl.term[t].asel == ASEL_W'(i)) shifted = ext << SHIFT_MAP[t][i];
      if (!ctrl.term[t].en)      term[t] = '0;
      else if (ctrl.term[t].neg) term[t] = ~shifted + OW'(1);
      else                       term[t] = shifted;
    end
  end

  // 3:2 carry-save layer, then the carry-propagate adder
  assign csa_s  = term[0] ^ term[1] ^ term[2];
  assign csa_c  = ((term[0] & term[1]) | (term[0] & term[2]) | (term[1] & term[2])) << 1;
  assign fund_x = csa_s + csa_c;
  assign prod   = signed'(fund_x << ctrl.esh);
endmodule
