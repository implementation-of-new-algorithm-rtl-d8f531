// edbns_lut: EDBNS control look-up table.
//
// Read-only table addressed by the odd fundamental f of a coefficient,
// address (f-1)/2, f = 1,3,..,127. Each word holds, for the T = 3 term
// positions, the term enable, sign, POBS select and shifter select
// (edbns_pkg::term_ctrl_t, 7 bits per term, position 0 in the low bits).
// Even coefficients have no entries of their own: they reuse their
// fundamental's word and add a factor 2^e (see edbns_encoder), which halves
// the table.
//
// Contents: word (f-1)/2 is a minimum-term representation
//   f = sum over enabled t of (+/-) 2^SHIFT_MAP[t][asel_t] * 3^POBS_MAP[t][bsel_t]
// chosen by exhaustive search over all sums of up to three signed terms and
// restricted to the per-position input sets of edbns_pkg; 5 fundamentals need
// one term (1, 3, 9, 27, 81), 56 two and 3 three
// (103, 115, 121). Example:
// word 1 (f = 3) = 21'h002400 enables term 1 only, bsel 1 (3^1), shift 0.
// To change the number system, regenerate both edbns_pkg's input sets and this
// table; the testbench re-evaluates every word against 2a+1.
//
// Combinational read (a ROM; a synthesis tool maps it to logic or a ROM macro).
module edbns_lut (
  input  logic [edbns_pkg::LUT_AW-1:0] addr,
  output edbns_pkg::term_vec_t         word
);
  import edbns_pkg::*;

  localparam term_vec_t ROM [LUT_DEPTH] = '{
    21'h000040, 21'h002400, 21'h104040, 21'h120040, 21'h000048, 21'h124060, 21'h124040, 21'h108060,
    21'h108040, 21'h10a400, 21'h124048, 21'h10c068, 21'h108048, 21'h000050, 21'h10f400, 21'h10c060,
    21'h10c040, 21'h10e400, 21'h110070, 21'h128068, 21'h10c048, 21'h108050, 21'h12b400, 21'h128060,
    21'h128040, 21'h12a400, 21'h140060, 21'h140040, 21'h142400, 21'h10c050, 21'h113400, 21'h110060,
    21'h110040, 21'h112400, 21'h003449, 21'h003049, 21'h002049, 21'h002449, 21'h184058, 21'h180058,
    21'h000058, 21'h100058, 21'h104058, 21'h12c068, 21'h002c41, 21'h110050, 21'h12f400, 21'h12c060,
    21'h12c040, 21'h12e400, 21'h114070, 21'h12f041, 21'h147400, 21'h144060, 21'h144040, 21'h146400,
    21'h10c058, 21'h147041, 21'h144048, 21'h114068, 21'h116061, 21'h12c050, 21'h117400, 21'h114060
  };

  assign word = ROM[addr];
endmodule
