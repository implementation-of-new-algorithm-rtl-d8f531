// tb_da_fir: a 10-tap, 4-input-LUT distributed-arithmetic filter (two full
// partial LUTs plus one 2-input LUT). Samples are offered continuously, so
// they wait on x_ready; every output is compared with the direct convolution,
// and the interval between accepted samples must be BX + 1 = 9 cycles
// (BX bit steps plus the cycle in which the sample is taken).
module tb_da_fir;
  localparam int N = 10, BX = 8, AW = 4;
  localparam int YW = 8 + BX + AW + 1;
  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [AW-1:0] coef_addr = '0;
  logic signed [7:0] coef_data = '0;
  logic x_valid = 0, x_ready;
  logic signed [BX-1:0] x = '0;
  logic y_valid;
  logic signed [YW-1:0] y;
  int checks = 0, failures = 0;
  int h [N], hist [N];
  int expq [$];
  int n_out = 0, n_stall = 0, last_acc = -1, cyc = 0;

  da_fir #(.N(N), .L(4), .BX(BX), .CW(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (x_valid && !x_ready) n_stall++;
    if (x_valid && x_ready) begin
      if (last_acc >= 0) begin
        checks++;
        if (cyc - last_acc != BX + 1) begin failures++; $display("sample interval %0d", cyc - last_acc); end
      end
      last_acc = cyc;
    end
    if (y_valid) begin
      int e;
      e = expq.pop_front();
      checks++; n_out++;
      if (int'(y) != e) begin failures++; $display("y=%0d expected %0d", y, e); end
    end
  end

  initial begin
    int fixed [N] = '{-128, 127, 0, 64, -2, 96, 1, -1, 3, -85};
    for (int i = 0; i < N; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      h[i] = fixed[i];
      coef_we <= 1; coef_addr <= AW'(i); coef_data <= 8'(fixed[i]);
      @(posedge clk);
    end
    coef_we <= 0;
    for (int k = 0; k < 300; k++) begin
      int v, acc;
      v = (k < 2) ? (k == 0 ? -128 : 127) : int'($urandom_range(0, 255)) - 128;
      x_valid <= 1; x <= BX'(v);
      @(posedge clk);
      while (!x_ready) @(posedge clk);
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = v;
      acc = 0;
      for (int i = 0; i < N; i++) acc += h[i] * hist[i];
      expq.push_back(acc);
    end
    x_valid <= 0;
    repeat (BX + 3) @(posedge clk);
    checks++;
    if (n_out != 300 || n_stall == 0) begin failures++; $display("outputs %0d stalls %0d", n_out, n_stall); end
    $display("outputs=%0d stall_cycles=%0d", n_out, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
