// tm_mcm: time-multiplexed multiple constant multiplication block.
//
// Multiplies one input sample x by the N programmable coefficients of the
// filter at once. A single power-of-b generator (pobg) forms x*b^k for all k;
// every tap then owns a power-of-b selector (pobs) and a double base
// coefficient generator (dbcg) that combine at most T shifted, signed powers
// into h[i]*x. Which powers, shifts and signs a tap uses is set by its control
// word ctrl[i] (edbns_pkg::tap_ctrl_t), so changing a coefficient only changes
// multiplexer selects: no multiplier is needed. This POBG / N x POBS /
// N x DBCG organisation is the filter's.
//
// Purely combinational: prod[i] = h[i] * x, signed DW + COEF_W bits.
module tm_mcm #(
  parameter int unsigned N  = 100,
  parameter int unsigned DW = 8,
  parameter int unsigned OW = DW + edbns_pkg::COEF_W
) (
  input  logic signed [DW-1:0]  x,
  input  edbns_pkg::tap_ctrl_t  ctrl [N],
  output logic signed [OW-1:0]  prod [N]
);
  import edbns_pkg::*;

  localparam int unsigned PW = DW + POW_GROWTH;

  logic signed [PW-1:0] pw [NPOW];

  pobg #(.DW(DW)) u_pobg (.x(x), .p(pw));

  for (genvar i = 0; i < N; i++) begin : g_tap
    logic        [BSEL_W-1:0] sel [T];
    logic signed [PW-1:0]     m   [T];

    for (genvar t = 0; t < T; t++) begin : g_sel
      assign sel[t] = ctrl[i].term[t].bsel;
    end

    pobs #(.PW(PW)) u_pobs (.p(pw), .sel(sel), .m(m));
    dbcg #(.DW(DW), .PW(PW), .OW(OW)) u_dbcg (.m(m), .ctrl(ctrl[i]), .prod(prod[i]));
  end
endmodule
