// tb_pobg: checks the power-of-b generator for every 8-bit input, in the three
// configurations of the generator: b = 3 chained, b = 3 depth optimised and
// b = 5 chained. Expected outputs are x * b^k computed with integers.
module tb_pobg;
  logic signed [7:0]  x;
  logic signed [14:0] p_opt   [5];
  logic signed [14:0] p_chain [5];
  logic signed [17:0] p_b5    [5];
  int checks = 0, failures = 0;

  pobg #(.DW(8))                                   dut_opt   (.x(x), .p(p_opt));
  pobg #(.DW(8), .DEPTH_OPT(1'b0))                 dut_chain (.x(x), .p(p_chain));
  pobg #(.DW(8), .BS(2), .GROW(10), .DEPTH_OPT(1'b0)) dut_b5  (.x(x), .p(p_b5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      int e3, e5;
      x = 8'(v);
      #1;
      e3 = v; e5 = v;
      for (int k = 0; k < 5; k++) begin
        checks += 3;
        if (int'(p_opt[k])   != e3) begin failures++; $display("opt   x=%0d k=%0d got %0d", v, k, p_opt[k]); end
        if (int'(p_chain[k]) != e3) begin failures++; $display("chain x=%0d k=%0d got %0d", v, k, p_chain[k]); end
        if (int'(p_b5[k])    != e5) begin failures++; $display("b5    x=%0d k=%0d got %0d", v, k, p_b5[k]); end
        e3 *= 3; e5 *= 5;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
