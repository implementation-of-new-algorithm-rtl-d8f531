// edbns_fir_stream_check: drives one edbns_fir of N taps with random
// coefficients and a random sample stream, and compares every output with
// the direct convolution. Used by the tap-count sweep; reports its counts on
// its outputs when done is high.
module edbns_fir_stream_check #(
  parameter int N       = 10,
  parameter int SAMPLES = 300
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int AW = (N > 1) ? $clog2(N) : 1;
  localparam int YW = 8 + 8 + AW;
  logic coef_we = 0;
  logic [AW-1:0] coef_addr = '0;
  logic signed [7:0] coef_data = '0;
  logic x_valid = 0;
  logic signed [7:0] x = '0;
  logic y_valid;
  logic signed [YW-1:0] y;
  int h [N], hist [N];
  int q [$];

  edbns_fir #(.N(N), .DW(8)) dut (.*);

  initial begin done = 0; checks = 0; failures = 0; end

  always @(posedge clk) if (rst_n && y_valid) begin
    int e;
    e = q.pop_front();
    checks++;
    if (int'(y) != e) begin
      failures++;
      if (failures < 5) $display("N=%0d: y=%0d expected %0d", N, y, e);
    end
  end

  initial begin
    for (int i = 0; i < N; i++) hist[i] = 0;
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      h[i] = int'($urandom_range(0, 255)) - 128;
      coef_we = 1; coef_addr = AW'(i); coef_data = 8'(h[i]);
      @(negedge clk);
    end
    coef_we = 0;
    for (int k = 0; k < SAMPLES; k++) begin
      int acc;
      x_valid = 1; x = 8'(int'($urandom_range(0, 255)) - 128);
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(x);
      acc = 0;
      for (int i = 0; i < N; i++) acc += h[i] * hist[i];
      q.push_back(acc);
      @(negedge clk);
    end
    x_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("N=%0d: %0d outputs missing", N, q.size()); end
    done = 1;
  end
endmodule
