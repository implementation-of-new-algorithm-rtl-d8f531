// edbns_pkg: constants and types shared by the EDBNS programmable FIR filter.
//
// A coefficient c is written as c = 2^e * f, f odd (the fundamental), and f as a
// sum of at most T signed double base terms  f = sum_t s_t * 2^a_t * b^k_t.
// With b = 3, powers b^0..b^4 = {1,3,9,27,81} and T = 3, every odd magnitude
// 1..127 of a signed 8-bit coefficient has such a representation.
//
// Each term position t has its own reduced multiplexer input set: POBS_MAP[t]
// lists the four powers of b that position t can select (2-bit select), and
// SHIFT_MAP[t] lists the hardwired shift amounts its shifter multiplexer offers
// (3-bit select, unused slots repeat a legal shift). Both sets, and the
// contents of edbns_lut, come from one exhaustive search: over all minimum-
// term representations of each fundamental, choose the position input sets
// that cover every fundamental with the fewest distinct shifts per position.
// The base b = 3, T = 3 terms, 4-input selectors and 8-bit coefficients follow
// the filter this RTL implements; the particular sets are this design's result
// of that search.
package edbns_pkg;

  localparam int unsigned COEF_W  = 8;   // coefficient word length
  localparam int unsigned B_SHIFT = 1;   // b = 2^B_SHIFT + 1 = 3
  localparam int unsigned NPOW    = 5;   // powers b^0 .. b^4
  localparam int unsigned POW_GROWTH = 7; // bits added by the largest power, 81 < 2^7
  localparam int unsigned T       = 3;   // double base terms per coefficient
  localparam int unsigned MUX_IN  = 4;   // POBS multiplexer inputs per term
  localparam int unsigned BSEL_W  = 2;
  localparam int unsigned N_ASEL  = 8;   // shifter multiplexer inputs per term
  localparam int unsigned ASEL_W  = 3;
  localparam int unsigned ESH_W   = 3;   // even factor 2^e, e = 0..7
  localparam int unsigned LUT_DEPTH = 64; // odd fundamentals 1,3,..,127
  localparam int unsigned LUT_AW  = 6;

  typedef int unsigned pobs_map_t  [T][MUX_IN];
  typedef int unsigned shift_map_t [T][N_ASEL];

  // power index (k of b^k) behind each POBS multiplexer input
  localparam pobs_map_t POBS_MAP = '{
    '{0, 2, 3, 4},    // term 0: 1, 9, 27, 81
    '{0, 1, 3, 4},    // term 1: 1, 3, 27, 81
    '{0, 1, 3, 4}     // term 2: 1, 3, 27, 81
  };

  // hardwired shift behind each shifter multiplexer input
  localparam shift_map_t SHIFT_MAP = '{
    '{0, 3, 3, 3, 3, 3, 3, 3},
    '{0, 0, 0, 0, 0, 0, 0, 0},
    '{1, 2, 4, 5, 6, 7, 7, 7}
  };

  // control of one double base term
  typedef struct packed {
    logic              en;    // term present
    logic              neg;   // term subtracted
    logic [BSEL_W-1:0] bsel;  // POBS multiplexer select
    logic [ASEL_W-1:0] asel;  // shifter multiplexer select
  } term_ctrl_t;

  typedef term_ctrl_t [T-1:0] term_vec_t;   // one LUT word

  // control of one tap
  typedef struct packed {
    term_vec_t        term;
    logic [ESH_W-1:0] esh;    // even factor: product shifted left by esh
  } tap_ctrl_t;

endpackage
