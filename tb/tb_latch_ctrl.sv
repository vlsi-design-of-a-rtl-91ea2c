// tb_latch_ctrl: checks the NORMAL and SHIFT strobes for every PHI1/OP
// combination: NORMAL only in PHI1 with OP high, SHIFT only in PHI1 with OP
// low.
module tb_latch_ctrl;
  logic phi1, op, normal, shift;
  int checks = 0, failures = 0;

  latch_ctrl dut (.phi1(phi1), .op(op), .normal(normal), .shift(shift));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic en, es;
      {phi1, op} = 2'(v);
      #1;
      en = (v == 3);
      es = (v == 2);
      checks++;
      if (normal != en || shift != es) begin
        failures++;
        $display("FAIL phi1=%0d op=%0d normal=%0d shift=%0d", phi1, op, normal, shift);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
