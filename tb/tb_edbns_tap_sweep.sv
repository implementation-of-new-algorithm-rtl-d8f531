// tb_edbns_tap_sweep: the EDBNS filter at the tap counts of the evaluated
// filter set (10 to 100 taps, 8-bit coefficients): 10, 25, 50, 75 and 100
// taps run in parallel, each with random coefficients and 300 random samples
// checked against the direct convolution.
module tb_edbns_tap_sweep;
  logic clk = 0, rst_n = 0;
  localparam int NS = 5;
  logic done [NS];
  int   ck [NS], fl [NS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  edbns_fir_stream_check #(.N(10))  u10  (.clk, .rst_n, .done(done[0]), .checks(ck[0]), .failures(fl[0]));
  edbns_fir_stream_check #(.N(25))  u25  (.clk, .rst_n, .done(done[1]), .checks(ck[1]), .failures(fl[1]));
  edbns_fir_stream_check #(.N(50))  u50  (.clk, .rst_n, .done(done[2]), .checks(ck[2]), .failures(fl[2]));
  edbns_fir_stream_check #(.N(75))  u75  (.clk, .rst_n, .done(done[3]), .checks(ck[3]), .failures(fl[3]));
  edbns_fir_stream_check #(.N(100)) u100 (.clk, .rst_n, .done(done[4]), .checks(ck[4]), .failures(fl[4]));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < NS; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
