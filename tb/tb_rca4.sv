// tb_rca4: exhaustive check of the 4-bit ripple-carry slice against the low
// four bits of x + y + ci.
module tb_rca4;
  logic [3:0] x, y, s;
  logic ci;
  int checks = 0, failures = 0;

  rca4 dut (.x(x), .y(y), .ci(ci), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [3:0] e;
      {ci, x, y} = 9'(v);
      #1;
      e = 4'(int'(x) + int'(y) + int'(ci));
      checks++;
      if (s != e) begin
        failures++;
        $display("FAIL x=%h y=%h ci=%0d s=%h expected %h", x, y, ci, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
