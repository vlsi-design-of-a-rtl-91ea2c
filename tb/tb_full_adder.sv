// tb_full_adder: exhaustive check of the one-bit full adder against
// integer addition of its three inputs.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int sum;
      {a, b, ci} = 3'(v);
      #1;
      sum = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} != 2'(sum)) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
