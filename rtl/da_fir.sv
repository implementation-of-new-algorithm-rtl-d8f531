// da_fir: sequential distributed-arithmetic FIR filter.
//
// y = sum_{n=0}^{N-1} c_n * x[k-n] is computed bit-serially over the BX-bit
// two's complement samples: in each step one bit position b of all N stored
// samples forms an N-bit vector, whose inner product with the coefficients is
// read from LUTs and accumulated with weight 2^b (weight -2^b for the sign
// bit). The N-input LUT is split into floor(N/L) partial L-input LUTs plus one
// of N mod L inputs if N is not a multiple of L, and their outputs are added.
// That organisation (bit-serial accumulation, partial LUTs with L = 4) is the
// filter's; the handshake, the MSB-first accumulation order and the widths
// are this design's.
//
// Timing: a sample is accepted when x_valid and x_ready are both high; it
// enters the N-deep sample shift register and the filter is busy for BX
// cycles, processing bit BX-1 first (acc = -f) and then acc = 2*acc + f. In
// the cycle after the last step y_valid pulses with y for that sample, and
// x_ready is high again. One output every BX clock cycles at most.
// Coefficients are written through (coef_we, coef_addr, coef_data) into the
// partial LUT of group coef_addr / L; writes are meant for idle periods.
module da_fir #(
  parameter int unsigned N  = 16,
  parameter int unsigned L  = 4,
  parameter int unsigned BX = 8,
  parameter int unsigned CW = 8,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned YW = CW + BX + AW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_we,
  input  logic [AW-1:0]        coef_addr,
  input  logic signed [CW-1:0] coef_data,
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic signed [BX-1:0] x,
  output logic                 y_valid,
  output logic signed [YW-1:0] y
);
  localparam int unsigned NG   = N / L;              // full partial LUTs
  localparam int unsigned LR   = N % L;              // inputs of the extra LUT
  localparam int unsigned NLUT = NG + ((LR != 0) ? 1 : 0);
  localparam int unsigned IW   = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned FW   = CW + IW + 1;        // partial LUT output
  localparam int unsigned SW   = FW + AW + 1;        // sum over all LUTs
  localparam int unsigned CNTW = (BX > 1) ? $clog2(BX) : 1;

  logic signed [BX-1:0] xs [N];      // xs[n] = x[k-n]
  logic                 busy;
  logic [CNTW-1:0]      bitpos;
  logic [N-1:0]         bitvec;
  logic signed [FW-1:0] part [NLUT];
  logic signed [SW-1:0] fsum;
  logic signed [YW-1:0] acc;

  for (genvar n = 0; n < N; n++) begin : g_bits
    assign bitvec[n] = xs[n][bitpos];
  end

  for (genvar g = 0; g < NLUT; g++) begin : g_lut
    localparam int unsigned LG = (g < NG) ? L : LR;
    localparam int unsigned IG = (LG > 1) ? $clog2(LG) : 1;
    localparam int unsigned PG = CW + IG + 1;
    logic signed [PG-1:0] d;
    logic                 we_g;
    assign we_g = coef_we && (32'(coef_addr) / L == g) && (32'(coef_addr) < N);
    da_partial_lut #(.L(LG), .CW(CW)) u_plut (
      .clk(clk), .rst_n(rst_n),
      .we(we_g), .idx(IG'(32'(coef_addr) % L)), .cval(coef_data),
      .addr(bitvec[g*L +: LG]), .data(d));
    assign part[g] = FW'(d);
  end

  always_comb begin
    fsum = '0;
    for (int g = 0; g < NLUT; g++) fsum = fsum + SW'(part[g]);
  end

  assign x_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) xs[n] <= '0;
      busy    <= 1'b0;
      bitpos  <= '0;
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (!busy) begin
        if (x_valid) begin
          xs[0] <= x;
          for (int n = 1; n < N; n++) xs[n] <= xs[n-1];
          busy   <= 1'b1;
          bitpos <= CNTW'(BX - 1);
        end
      end else begin
        if (32'(bitpos) == BX - 1) acc <= -YW'(fsum);
        else                       acc <= (acc <<< 1) + YW'(fsum);
        if (bitpos == '0) begin
          busy    <= 1'b0;
          y_valid <= 1'b1;
          y       <= (acc <<< 1) + YW'(fsum);
        end else begin
          bitpos <= bitpos - 1'b1;
        end
      end
    end
  end
endmodule
