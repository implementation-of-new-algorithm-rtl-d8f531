// tb_tm_mcm: an 8-tap multiplier block. Coefficient sets (random, plus the
// extremes -128, 127, 0, 1, -1, 64, 96, -85) are encoded with edbns_encoder
// and every tap's product is compared with c*x for all 256 input values.
module tb_tm_mcm;
  import edbns_pkg::*;
  localparam int N = 8;
  logic signed [7:0]  x;
  logic signed [7:0]  coef [N];
  tap_ctrl_t          ctrl [N];
  logic signed [15:0] prod [N];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N; i++) begin : g_enc
    edbns_encoder u_enc (.coef(coef[i]), .ctrl(ctrl[i]));
  end

  tm_mcm #(.N(N), .DW(8)) dut (.x(x), .ctrl(ctrl), .prod(prod));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fixed [N] = '{-128, 127, 0, 1, -1, 64, 96, -85};
    for (int set = 0; set < 20; set++) begin
      for (int i = 0; i < N; i++) coef[i] = (set == 0) ? 8'(fixed[i]) : 8'($urandom);
      for (int v = -128; v < 128; v++) begin
        x = 8'(v);
        #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (int'(prod[i]) != int'(coef[i]) * v) begin
            failures++;
            if (failures < 10) $display("tap %0d c=%0d x=%0d got %0d", i, coef[i], v, prod[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
