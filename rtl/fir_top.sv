// fir_top: the two programmable FIR filters side by side.
//
// e_*  : edbns_fir, the multiplierless filter whose coefficient products come
//        from the extended double base number system (EDBNS) TM-MCM block:
//        one new sample per clock, output one cycle later.
// d_*  : da_fir, the sequential distributed-arithmetic filter with partial
//        4-input LUTs: one sample per BX cycles, valid/ready handshake.
// The two share only clock and reset; each has its own coefficient write
// port, sample input and output (see the two modules for timing).
module fir_top #(
  parameter int unsigned E_N  = 100,
  parameter int unsigned E_DW = 8,
  parameter int unsigned D_N  = 16,
  parameter int unsigned D_L  = 4,
  parameter int unsigned D_BX = 8,
  localparam int unsigned CW   = edbns_pkg::COEF_W,
  localparam int unsigned E_AW = (E_N > 1) ? $clog2(E_N) : 1,
  localparam int unsigned E_YW = E_DW + CW + E_AW,
  localparam int unsigned D_AW = (D_N > 1) ? $clog2(D_N) : 1,
  localparam int unsigned D_YW = CW + D_BX + D_AW + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // EDBNS filter
  input  logic                   e_coef_we,
  input  logic [E_AW-1:0]        e_coef_addr,
  input  logic signed [CW-1:0]   e_coef_data,
  input  logic                   e_x_valid,
  input  logic signed [E_DW-1:0] e_x,
  output logic                   e_y_valid,
  output logic signed [E_YW-1:0] e_y,
  // distributed-arithmetic filter
  input  logic                   d_coef_we,
  input  logic [D_AW-1:0]        d_coef_addr,
  input  logic signed [CW-1:0]   d_coef_data,
  input  logic                   d_x_valid,
  output logic                   d_x_ready,
  input  logic signed [D_BX-1:0] d_x,
  output logic                   d_y_valid,
  output logic signed [D_YW-1:0] d_y
);
  edbns_fir #(.N(E_N), .DW(E_DW)) u_edbns (
    .clk(clk), .rst_n(rst_n),
    .coef_we(e_coef_we), .coef_addr(e_coef_addr), .coef_data(e_coef_data),
    .x_valid(e_x_valid), .x(e_x), .y_valid(e_y_valid), .y(e_y));

  da_fir #(.N(D_N), .L(D_L), .BX(D_BX), .CW(CW)) u_da (
    .clk(clk), .rst_n(rst_n),
    .coef_we(d_coef_we), .coef_addr(d_coef_addr), .coef_data(d_coef_data),
    .x_valid(d_x_valid), .x_ready(d_x_ready), .x(d_x),
    .y_valid(d_y_valid), .y(d_y));
endmodule
