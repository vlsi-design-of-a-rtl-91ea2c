// tb_pg_gen: exhaustive check of the 4-bit block propagate/generate
// generator. Generate must equal the carry out of x+y with no carry in;
// propagate must be high exactly when every bit position has x or y set.
module tb_pg_gen;
  logic [3:0] x, y;
  logic p, g;
  int checks = 0, failures = 0;

  pg_gen dut (.x(x), .y(y), .p(p), .g(g));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [4:0] s;
      logic       pe;
      {x, y} = 8'(v);
      #1;
      s  = {1'b0, x} + {1'b0, y};
      pe = 1'b1;
      for (int i = 0; i < 4; i++) if (!x[i] && !y[i]) pe = 1'b0;
      checks++;
      if (g != s[4] || p != pe) begin
        failures++;
        $display("FAIL x=%h y=%h p=%0d g=%0d expected p=%0d g=%0d", x, y, p, g, pe, s[4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
