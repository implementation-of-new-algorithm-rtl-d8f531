// da_partial_lut: reconfigurable L-input partial LUT for distributed arithmetic.
//
// Holds the 2^L sums f_l(v) = sum_{j<L} v[j] * c_j of its L coefficients, for
// every bit vector v, as in the split of the DA inner product into partial
// L-input LUTs. Writing coefficient j (we, idx, cval) stores it and rewrites
// all 2^L entries from the updated coefficient set on the same edge, so the
// table is ready on the next cycle. Reading is combinational: data = f_l(addr).
// Recomputing the entries in hardware on a write, instead of loading them from
// outside, is this design's choice. Reset clears coefficients and entries.
module da_partial_lut #(
  parameter int unsigned L  = 4,
  parameter int unsigned CW = 8,
  localparam int unsigned IW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned FW = CW + IW + 1           // holds any subset sum
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [IW-1:0]        idx,
  input  logic signed [CW-1:0] cval,
  input  logic [L-1:0]         addr,
  output logic signed [FW-1:0] data
);
  logic signed [CW-1:0] coef     [L];
  logic signed [CW-1:0] coef_nxt [L];
  logic signed [FW-1:0] entry     [2**L];
  logic signed [FW-1:0] entry_nxt [2**L];

  always_comb begin
    for (int j = 0; j < L; j++)
      coef_nxt[j] = (32'(idx) == j) ? cval : coef[j];
    for (int k = 0; k < 2**L; k++) begin
      entry_nxt[k] = '0;
      for (int j = 0; j < L; j++)
        if (k[j]) entry_nxt[k] = entry_nxt[k] + FW'(coef_nxt[j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < L; j++) coef[j] <= '0;
      for (int k = 0; k < 2**L; k++) entry[k] <= '0;
    end else if (we) begin
      for (int j = 0; j < L; j++) coef[j] <= coef_nxt[j];
      for (int k = 0; k < 2**L; k++) entry[k] <= entry_nxt[k];
    end
  end

  assign data = entry[addr];
endmodule
