// tb_edbns_encoder: every signed 8-bit coefficient is encoded and the control
// word evaluated back (terms, signs, even shift) with integer arithmetic; the
// result must equal the coefficient. Also checks that the even shift equals
// the number of trailing zeros and that zero disables all terms.
module tb_edbns_encoder;
  import edbns_pkg::*;
  import edbns_ref_pkg::*;
  logic signed [7:0] coef;
  tap_ctrl_t         ctrl;
  int checks = 0, failures = 0;

  edbns_encoder dut (.coef(coef), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = -128; c < 128; c++) begin
      int tz;
      coef = 8'(c);
      #1;
      checks++;
      if (ctrl_value(ctrl) != c) begin
        failures++;
        $display("coef %0d: control %h encodes %0d", c, ctrl, ctrl_value(ctrl));
      end
      tz = 0;
      if (c != 0) while (((c >>> tz) & 1) == 0) tz++;
      checks++;
      if (int'(ctrl.esh) != tz) begin failures++; $display("coef %0d: esh %0d, expected %0d", c, ctrl.esh, tz); end
      if (c == 0) begin
        checks++;
        if (n_terms(ctrl.term) != 0) begin failures++; $display("zero coefficient has terms"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
