// tb_edbns_lut: reads every word of the EDBNS table and evaluates it term by
// term. Word a must encode the fundamental 2a+1 with at most three terms, and
// no disabled term may carry a select other than zero (unused fields clean).
module tb_edbns_lut;
  import edbns_pkg::*;
  import edbns_ref_pkg::*;
  logic [LUT_AW-1:0] addr;
  term_vec_t         word;
  int checks = 0, failures = 0;
  int hist [4] = '{0, 0, 0, 0};

  edbns_lut dut (.addr(addr), .word(word));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < LUT_DEPTH; a++) begin
      addr = LUT_AW'(a);
      #1;
      checks++;
      if (word_value(word) != 2 * a + 1) begin
        failures++;
        $display("addr %0d: word %h encodes %0d, expected %0d", a, word, word_value(word), 2 * a + 1);
      end
      checks++;
      if (n_terms(word) < 1 || n_terms(word) > T) begin failures++; $display("addr %0d: %0d terms", a, n_terms(word)); end
      else hist[n_terms(word)]++;
      for (int t = 0; t < T; t++) if (!word[t].en) begin
        checks++;
        if (word[t] != '0) begin failures++; $display("addr %0d: disabled term %0d not clean", a, t); end
      end
    end
    $display("terms per fundamental: 1:%0d 2:%0d 3:%0d", hist[1], hist[2], hist[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
