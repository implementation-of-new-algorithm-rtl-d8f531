// tb_pobs: drives the selector with five distinct values and checks, for every
// select of every term multiplexer, that the value of the intended power of b
// comes out. The expected input sets are written out here independently:
// term 0 offers {1,9,27,81}, terms 1 and 2 offer {1,3,27,81}.
module tb_pobs;
  import edbns_pkg::*;
  logic signed [14:0] p   [NPOW];
  logic        [1:0]  sel [T];
  logic signed [14:0] m   [T];
  int checks = 0, failures = 0;
  int exp_pow [T][4] = '{'{1, 9, 27, 81}, '{1, 3, 27, 81}, '{1, 3, 27, 81}};

  pobs #(.PW(15)) dut (.p(p), .sel(sel), .m(m));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      int x;
      x = int'($urandom_range(0, 200)) - 100;
      for (int k = 0, pw = 1; k < NPOW; k++, pw *= 3) p[k] = 15'(x * pw);
      for (int s = 0; s < 64; s++) begin
        for (int t = 0; t < T; t++) sel[t] = 2'(s >> (2 * t));
        #1;
        for (int t = 0; t < T; t++) begin
          checks++;
          if (int'(m[t]) != x * exp_pow[t][sel[t]]) begin
            failures++;
            $display("x=%0d t=%0d sel=%0d got %0d", x, t, sel[t], m[t]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
