// tb_da_partial_lut: a 4-input and a 3-input partial LUT. After each
// coefficient write every entry is read and compared with the subset sum of
// the coefficients selected by the address bits.
module tb_da_partial_lut;
  logic clk = 0, rst_n = 0;
  logic we4 = 0, we3 = 0;
  logic [1:0] idx = '0;
  logic signed [7:0] cval = '0;
  logic [3:0] addr4 = '0;
  logic [2:0] addr3 = '0;
  logic signed [10:0] d4;
  logic signed [10:0] d3;
  int checks = 0, failures = 0;
  int c4 [4] = '{0, 0, 0, 0};
  int c3 [3] = '{0, 0, 0};

  da_partial_lut #(.L(4), .CW(8)) dut4 (.clk, .rst_n, .we(we4), .idx(idx), .cval(cval), .addr(addr4), .data(d4));
  da_partial_lut #(.L(3), .CW(8)) dut3 (.clk, .rst_n, .we(we3), .idx(idx), .cval(cval), .addr(addr3), .data(d3));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int w = 0; w < 200; w++) begin
      int j, v, sel;
      sel = w % 2;
      v = (w < 4) ? -128 + 255 * (w % 2) : int'($urandom_range(0, 255)) - 128;
      j = sel ? int'($urandom_range(0, 2)) : int'($urandom_range(0, 3));
      idx <= 2'(j); cval <= 8'(v);
      if (sel) begin we3 <= 1; c3[j] = v; end else begin we4 <= 1; c4[j] = v; end
      @(posedge clk);
      we3 <= 0; we4 <= 0;
      for (int a = 0; a < 16; a++) begin
        int e4, e3;
        addr4 <= 4'(a); addr3 <= 3'(a);
        @(posedge clk);
        e4 = 0; e3 = 0;
        for (int b = 0; b < 4; b++) if (a[b]) e4 += c4[b];
        for (int b = 0; b < 3; b++) if (a[b]) e3 += c3[b];
        checks += 2;
        if (int'(d4) != e4) begin failures++; $display("L4 addr %0d got %0d exp %0d", a, d4, e4); end
        if (int'(d3) != e3) begin failures++; $display("L3 addr %0d got %0d exp %0d", a, d3, e3); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
