// edbns_fir: run-time programmable FIR filter on the EDBNS multiplier block.
//
// y[n] = sum_{i=0}^{N-1} h[i] * x[n-i], with h[i] signed COEF_W-bit
// coefficients that can be rewritten at any time. The filter is in transposed
// direct form: the tm_mcm block multiplies the current sample by all N
// coefficients, and a chain of N-1 structural adders and registers delays and
// sums the products. Coefficient multiplication is the EDBNS TM-MCM of the
// filter; the transposed-form structure, the write port and the sample
// handshake are this design's choices.
//
// Programming: when coef_we is high at a clock edge, coef_data is encoded
// (edbns_encoder, one LUT look-up) and the result stored as the control word
// of tap coef_addr; it multiplies the samples taken after that edge, while
// products already in the delay line keep their old coefficient. Reset clears every
// control word (all coefficients zero) and the delay line.
//
// Samples: x is taken at each edge where x_valid is high. y and y_valid are
// registered: one cycle after sample x[n] is taken, y_valid pulses and y holds
// y[n] at full precision (DW + COEF_W + clog2(N) bits, no rounding).
module edbns_fir #(
  parameter int unsigned N  = 100,
  parameter int unsigned DW = 8,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned OW = DW + edbns_pkg::COEF_W,
  localparam int unsigned YW = OW + AW
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // coefficient write port
  input  logic                                coef_we,
  input  logic        [AW-1:0]                coef_addr,
  input  logic signed [edbns_pkg::COEF_W-1:0] coef_data,
  // samples
  input  logic                                x_valid,
  input  logic signed [DW-1:0]                x,
  output logic                                y_valid,
  output logic signed [YW-1:0]                y
);
  import edbns_pkg::*;

  tap_ctrl_t            ctrl [N];
  tap_ctrl_t            ctrl_new;
  logic signed [OW-1:0] prod [N];
  logic signed [YW-1:0] z    [N];   // z[0] unused; z[i] holds the partial sum entering tap i-1

  edbns_encoder u_enc (.coef(coef_data), .ctrl(ctrl_new));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) ctrl[i] <= '0;
    end else if (coef_we && 32'(coef_addr) < N) begin
      ctrl[coef_addr] <= ctrl_new;
    end
  end

  tm_mcm #(.N(N), .DW(DW), .OW(OW)) u_mcm (.x(x), .ctrl(ctrl), .prod(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) z[i] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        for (int i = 1; i < N - 1; i++) z[i] <= YW'(prod[i]) + z[i+1];
        if (N > 1) begin
          z[N-1] <= YW'(prod[N-1]);
          y      <= YW'(prod[0]) + z[1];
        end else begin
          y      <= YW'(prod[0]);
        end
      end
    end
  end
endmodule
