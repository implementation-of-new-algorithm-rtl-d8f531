// pobg: power-of-b generator.
//
// Produces p[k] = x * b^k for k = 0..NPOW-1 with b = 2^BS + 1, one adder per
// power, so that the whole filter shares these multiples of the input sample.
// Without depth optimisation the powers form a chain, p[k] = p[k-1] +
// (p[k-1] << BS), and the adder depth grows with k. With DEPTH_OPT (only for
// b = 3, where b^2 - 1 = 8 is a power of two) p[1] = x + 2x and, for k >= 2,
// p[k] = p[k-2] + (p[k-2] << 3), so the depth is ceil(k/2): x,3x,9x,27x,81x
// are reached in at most two adder levels. Both structures are the ones the
// filter uses; the default (b = 3, depth optimised) is its main one.
//
// Purely combinational. x is signed DW bits; every output is signed
// DW + GROW bits, GROW large enough for b^(NPOW-1).
module pobg #(
  parameter int unsigned DW        = 8,
  parameter int unsigned BS        = edbns_pkg::B_SHIFT,
  parameter int unsigned NPOW      = edbns_pkg::NPOW,
  parameter int unsigned GROW      = edbns_pkg::POW_GROWTH,
  parameter bit          DEPTH_OPT = 1'b1
) (
  input  logic signed [DW-1:0]      x,
  output logic signed [DW+GROW-1:0] p [NPOW]
);
  localparam int unsigned PW = DW + GROW;

  initial begin
    assert (!DEPTH_OPT || BS == 1)
      else $error("pobg: depth optimisation needs b = 3");
  end

  assign p[0] = PW'(x);

  for (genvar k = 1; k < NPOW; k++) begin : g_pow
    if (DEPTH_OPT && k >= 2) begin : g_opt
      assign p[k] = p[k-2] + (p[k-2] <<< 3);
    end else begin : g_chain
      assign p[k] = p[k-1] + (p[k-1] <<< BS);
    end
  end
endmodule
