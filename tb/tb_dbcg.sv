// tb_dbcg: random POBS outputs and random term controls. The expected product
// is the signed sum of the enabled terms, each m[t] * 2^shift, times 2^esh,
// taken modulo 2^16 (the generator's output width), computed with 64-bit
// integers. A second set feeds true multiples 9x, 3x, x and checks the
// product (9 - 3 + 2^7) * x, with and without an even shift.
module tb_dbcg;
  import edbns_pkg::*;
  logic signed [14:0] m [T];
  tap_ctrl_t          ctrl;
  logic signed [15:0] prod;
  int checks = 0, failures = 0;
  int shift_tab [T][8] = '{'{0,3,3,3,3,3,3,3}, '{0,0,0,0,0,0,0,0}, '{1,2,4,5,6,7,7,7}};

  dbcg #(.DW(8)) dut (.m(m), .ctrl(ctrl), .prod(prod));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 5000; r++) begin
      longint s;
      ctrl = tap_ctrl_t'($urandom);
      for (int t = 0; t < T; t++) m[t] = 15'($urandom);
      #1;
      s = 0;
      for (int t = 0; t < T; t++)
        if (ctrl.term[t].en) begin
          longint v;
          v = longint'(m[t]) <<< shift_tab[t][ctrl.term[t].asel];
          s = ctrl.term[t].neg ? s - v : s + v;
        end
      s = s <<< ctrl.esh;
      checks++;
      if (prod != 16'(s)) begin
        failures++;
        $display("r=%0d ctrl=%h got %0d exp %0d", r, ctrl, prod, 16'(s));
      end
    end
    // m = 9x, 3x, x with controls +9x, -3x, +(x << 7); esh alternates 0 and 1
    for (int x = -128; x < 128; x++) begin
      m[0] = 15'(9 * x); m[1] = 15'(3 * x); m[2] = 15'(x);
      ctrl = '0;
      ctrl.term[0] = '{en:1'b1, neg:1'b0, bsel:2'd1, asel:3'd0};
      ctrl.term[1] = '{en:1'b1, neg:1'b1, bsel:2'd1, asel:3'd0};
      ctrl.term[2] = '{en:1'b1, neg:1'b0, bsel:2'd0, asel:3'd5};
      ctrl.esh = 3'(x & 1);
      #1;
      checks++;
      if (int'(prod) != int'(16'((9 - 3 + 128) * x * (1 << (x & 1))))) begin
        failures++; $display("x=%0d got %0d", x, prod);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
