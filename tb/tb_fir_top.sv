// tb_fir_top: end-to-end test of both filters at their default sizes
// (100-tap EDBNS filter, 16-tap distributed-arithmetic filter, 8-bit data).
//
// EDBNS side: all 100 coefficients are programmed (covering zero, even,
// negative, -128 and 127 values and one-, two- and three-term fundamentals),
// 400 random samples with gaps are filtered, all coefficients are rewritten
// while samples keep flowing, and 300 more samples follow. Each output is
// compared with the convolution computed here, each past sample paired with
// the coefficient set in force when it arrived (transposed-form semantics),
// and y must follow its sample by exactly one cycle.
// DA side: 16 coefficients, 200 samples offered back to back (so the filter
// stalls them), outputs compared with the convolution, one sample per BX + 1
// cycles.
// Every mechanism is counted and a failure is counted for one that never
// occurred.
module tb_fir_top;
  import edbns_pkg::*;
  import edbns_ref_pkg::*;
  localparam int EN = 100, EAW = 7, EYW = 8 + 8 + EAW;
  localparam int DN = 16, DAW = 4, BX = 8, DYW = 8 + BX + DAW + 1;

  logic clk = 0, rst_n = 0;
  logic e_coef_we = 0;
  logic [EAW-1:0] e_coef_addr = '0;
  logic signed [7:0] e_coef_data = '0;
  logic e_x_valid = 0;
  logic signed [7:0] e_x = '0;
  logic e_y_valid;
  logic signed [EYW-1:0] e_y;
  logic d_coef_we = 0;
  logic [DAW-1:0] d_coef_addr = '0;
  logic signed [7:0] d_coef_data = '0;
  logic d_x_valid = 0, d_x_ready;
  logic signed [BX-1:0] d_x = '0;
  logic d_y_valid;
  logic signed [DYW-1:0] d_y;

  fir_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int m_reprog = 0, m_even = 0, m_neg = 0, m_zero = 0, m_t1 = 0, m_t2 = 0, m_t3 = 0;
  int m_gap = 0, m_stall = 0, m_negx = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- EDBNS filter ----------------
  int eh [EN];
  int ehist [EN];
  int esnap [EN][EN];
  int eq [$];
  logic e_exp_valid = 0;
  int e_out = 0;
  bit e_done = 0, d_done = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (e_y_valid != e_exp_valid) begin failures++; $display("EDBNS y_valid timing at %0t", $time); end
      if (e_y_valid) begin
        int e;
        e = eq.pop_front();
        checks++; e_out++;
        if (int'(e_y) != e) begin failures++; if (failures < 10) $display("EDBNS y=%0d exp %0d", e_y, e); end
      end
    end
    e_exp_valid <= e_x_valid && rst_n;
  end

  task automatic e_write(int a, int c);
    e_coef_we = 1; e_coef_addr = EAW'(a); e_coef_data = 8'(c);
    @(negedge clk);
    e_coef_we = 0;
    eh[a] = c;
    if (c != 0 && c % 2 == 0) m_even++;
    if (c < 0) m_neg++;
    if (c == 0) m_zero++;
  endtask

  task automatic e_send(int v);
    int acc;
    e_x_valid = 1; e_x = 8'(v);
    for (int i = EN - 1; i > 0; i--) begin ehist[i] = ehist[i-1]; esnap[i] = esnap[i-1]; end
    ehist[0] = v; esnap[0] = eh;
    acc = 0;
    for (int i = 0; i < EN; i++) acc += esnap[i][i] * ehist[i];
    eq.push_back(acc);
    @(negedge clk);
    e_x_valid = 0;
  endtask

  task automatic e_count_terms();
    for (int i = 0; i < EN; i++)
      case (n_terms(dut.u_edbns.ctrl[i].term))
        1: m_t1++;
        2: m_t2++;
        3: m_t3++;
        default: ;
      endcase
  endtask

  initial begin : e_stim
    for (int i = 0; i < EN; i++) begin eh[i] = 0; ehist[i] = 0; end
    for (int k = 0; k < EN; k++) esnap[k] = eh;
    wait (rst_n);
    @(negedge clk);
    // first taps: the extremes and known hard cases, then random values
    e_write(0, -128); e_write(1, 127); e_write(2, 0); e_write(3, 64);
    e_write(4, 115);  e_write(5, -115); e_write(6, 3); e_write(7, -96);
    for (int i = 8; i < EN; i++) e_write(i, int'($urandom_range(0, 255)) - 128);
    e_count_terms();
    for (int k = 0; k < 400; k++) begin
      e_send(int'($urandom_range(0, 255)) - 128);
      if ($urandom_range(0, 4) == 0) begin m_gap++; @(negedge clk); end
    end
    // rewrite every coefficient, a sample between every few writes
    for (int i = 0; i < EN; i++) begin
      e_write(i, int'($urandom_range(0, 255)) - 128);
      if (i % 3 == 0) e_send(int'($urandom_range(0, 255)) - 128);
    end
    m_reprog++;
    e_count_terms();
    for (int k = 0; k < 300; k++) e_send(int'($urandom_range(0, 255)) - 128);
    repeat (3) @(negedge clk);
    checks++;
    if (eq.size() != 0) begin failures++; $display("EDBNS outputs missing: %0d", eq.size()); end
    e_done = 1;
  end

  // ---------------- distributed-arithmetic filter ----------------
  int dh [DN], dhist [DN];
  int dq [$];
  int d_out = 0, d_last = -1, cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    if (d_x_valid && !d_x_ready) m_stall++;
    if (d_x_valid && d_x_ready) begin
      if (d_last >= 0) begin
        checks++;
        if (cyc - d_last != BX + 1) begin failures++; $display("DA sample interval %0d", cyc - d_last); end
      end
      d_last = cyc;
    end
    if (d_y_valid) begin
      int e;
      e = dq.pop_front();
      checks++; d_out++;
      if (int'(d_y) != e) begin failures++; if (failures < 10) $display("DA y=%0d exp %0d", d_y, e); end
    end
  end

  initial begin : d_stim
    for (int i = 0; i < DN; i++) dhist[i] = 0;
    wait (rst_n);
    @(negedge clk);
    for (int i = 0; i < DN; i++) begin
      dh[i] = (i == 0) ? -128 : (i == 1) ? 127 : int'($urandom_range(0, 255)) - 128;
      d_coef_we = 1; d_coef_addr = DAW'(i); d_coef_data = 8'(dh[i]);
      @(negedge clk);
    end
    d_coef_we = 0;
    for (int k = 0; k < 200; k++) begin
      int v, acc;
      v = (k == 0) ? -128 : (k == 1) ? 127 : int'($urandom_range(0, 255)) - 128;
      if (v < 0) m_negx++;
      d_x_valid = 1; d_x = BX'(v);
      @(posedge clk);
      while (!d_x_ready) @(posedge clk);
      @(negedge clk);
      d_x_valid = 0;
      for (int i = DN - 1; i > 0; i--) dhist[i] = dhist[i-1];
      dhist[0] = v;
      acc = 0;
      for (int i = 0; i < DN; i++) acc += dh[i] * dhist[i];
      dq.push_back(acc);
    end
    repeat (BX + 3) @(negedge clk);
    checks++;
    if (dq.size() != 0) begin failures++; $display("DA outputs missing: %0d", dq.size()); end
    d_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (e_done && d_done);
    $display("EDBNS outputs=%0d reprogram=%0d even=%0d negative=%0d zero=%0d terms1=%0d terms2=%0d terms3=%0d gaps=%0d",
             e_out, m_reprog, m_even, m_neg, m_zero, m_t1, m_t2, m_t3, m_gap);
    $display("DA outputs=%0d stall_cycles=%0d negative_samples=%0d", d_out, m_stall, m_negx);
    checks += 10;
    if (m_reprog == 0) begin failures++; $display("no reprogramming"); end
    if (m_even == 0)   begin failures++; $display("no even coefficient"); end
    if (m_neg == 0)    begin failures++; $display("no negative coefficient"); end
    if (m_zero == 0)   begin failures++; $display("no zero coefficient"); end
    if (m_t1 == 0)     begin failures++; $display("no one-term coefficient"); end
    if (m_t2 == 0)     begin failures++; $display("no two-term coefficient"); end
    if (m_t3 == 0)     begin failures++; $display("no three-term coefficient"); end
    if (m_gap == 0)    begin failures++; $display("no sample gap"); end
    if (m_stall == 0)  begin failures++; $display("no DA stall"); end
    if (m_negx == 0)   begin failures++; $display("no negative DA sample"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
