// tb_edbns_fir: a 12-tap EDBNS filter. Coefficients are written (random, with
// zero, even, negative and extreme values), a random sample stream with gaps
// is filtered, and every output is compared with the direct convolution
// sum h[i]*x[n-i] computed by the testbench. y_valid must follow each sample
// by exactly one cycle. Halfway through, two coefficients are rewritten while
// samples keep flowing. In the transposed form a new coefficient multiplies
// the samples that arrive after the write, while products already in the
// delay line keep the old one: the reference model keeps, with each past
// sample, the coefficient set in force when it arrived.
module tb_edbns_fir;
  localparam int N  = 12;
  localparam int AW = 4;
  localparam int YW = 8 + 8 + AW;
  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [AW-1:0] coef_addr = '0;
  logic signed [7:0] coef_data = '0;
  logic x_valid = 0;
  logic signed [7:0] x = '0;
  logic y_valid;
  logic signed [YW-1:0] y;
  int checks = 0, failures = 0;
  int h [N];
  int hist [N];
  int hsnap [N][N];   // hsnap[k] = coefficient set in force when hist[k] arrived
  int expq [$];
  int n_out = 0, n_reprog = 0;

  edbns_fir #(.N(N), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus changes on the falling edge, one clock per call
  task automatic write_coef(int a, int c);
    coef_we = 1; coef_addr = AW'(a); coef_data = 8'(c);
    @(negedge clk);
    coef_we = 0;
    h[a] = c;
  endtask

  // output checker: y_valid exactly one cycle after each accepted sample
  logic exp_valid = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (y_valid != exp_valid) begin failures++; $display("y_valid timing wrong at %0t", $time); end
      if (y_valid) begin
        int e;
        e = expq.pop_front();
        checks++;
        n_out++;
        if (int'(y) != e) begin failures++; $display("y=%0d expected %0d", y, e); end
      end
    end
    exp_valid <= x_valid && rst_n;
  end

  task automatic send(int v);
    int acc;
    x_valid = 1; x = 8'(v);
    for (int i = N - 1; i > 0; i--) begin hist[i] = hist[i-1]; hsnap[i] = hsnap[i-1]; end
    hist[0] = v;
    hsnap[0] = h;
    acc = 0;
    for (int i = 0; i < N; i++) acc += hsnap[i][i] * hist[i];
    expq.push_back(acc);
    @(negedge clk);
    x_valid = 0;
  endtask

  initial begin
    int fixed [N] = '{-128, 127, 0, 64, -2, 96, 1, -1, 3, -85, 40, 17};
    for (int i = 0; i < N; i++) begin h[i] = 0; hist[i] = 0; end
    for (int k = 0; k < N; k++) hsnap[k] = h;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) write_coef(i, fixed[i]);
    for (int k = 0; k < 300; k++) begin
      if (k == 150) begin
        // reprogramming between two back-to-back samples
        write_coef(2, -77); write_coef(7, 112); n_reprog++;
      end
      send(int'($urandom_range(0, 255)) - 128);
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    for (int i = 0; i < N; i++) write_coef(i, int'($urandom_range(0, 255)) - 128);
    n_reprog++;
    for (int k = 0; k < 200; k++) send(int'($urandom_range(0, 255)) - 128);
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != 500 || expq.size() != 0) begin failures++; $display("outputs %0d", n_out); end
    $display("outputs=%0d reprogrammings=%0d", n_out, n_reprog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
