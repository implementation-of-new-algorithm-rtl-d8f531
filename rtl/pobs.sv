// pobs: power-of-b selector of one filter tap.
//
// T multiplexers, one per double base term. Multiplexer t sees only the MUX_IN
// powers of b listed in POBS_MAP[t] (a reduced input set instead of all NPOW
// powers) and passes the one chosen by its 2-bit select to the tap's double
// base coefficient generator. Each POBG output therefore fans out to as many
// multiplexers as there are term positions able to use it.
//
// Purely combinational. Inputs: the NPOW multiples of x from pobg and the T
// selects of the tap; outputs: T selected multiples.
module pobs #(
  parameter int unsigned PW = 15
) (
  input  logic signed [PW-1:0]                 p   [edbns_pkg::NPOW],
  input  logic        [edbns_pkg::BSEL_W-1:0]  sel [edbns_pkg::T],
  output logic signed [PW-1:0]                 m   [edbns_pkg::T]
);
  import edbns_pkg::*;

  for (genvar t = 0; t < T; t++) begin : g_mux
    always_comb begin
      m[t] = p[POBS_MAP[t][0]];
      for (int i = 1; i < MUX_IN; i++)
        if (sel[t] == BSEL_W'(i)) m[t] = p[POBS_MAP[t][i]];
    end
  end
endmodule
