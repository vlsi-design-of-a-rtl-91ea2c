// tb_cla_unit: drives the lookahead unit with the block P and G of random
// 32-bit operand pairs (computed here by plain addition) and checks every
// block carry against the carry into that bit position of x+y.
module tb_cla_unit;
  logic [6:0] g;
  logic [6:1] p;
  logic [7:1] c;
  int checks = 0, failures = 0;

  cla_unit dut (.g(g), .p(p), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] y);
    for (int i = 0; i < 7; i++) begin
      logic [4:0] s = {1'b0, x[4*i +: 4]} + {1'b0, y[4*i +: 4]};
      g[i] = s[4];
      if (i > 0) p[i] = &(x[4*i +: 4] | y[4*i +: 4]);
    end
    #1;
    for (int i = 1; i < 8; i++) begin
      logic [32:0] lo = ({1'b0, x} & ((33'd1 << (4*i)) - 1)) + ({1'b0, y} & ((33'd1 << (4*i)) - 1));
      checks++;
      if (c[i] != lo[4*i]) begin
        failures++;
        $display("FAIL x=%h y=%h carry into bit %0d: got %0d", x, y, 4*i, c[i]);
      end
    end
  endtask

  initial begin
    run(32'h0000_0000, 32'h0000_0000);
    run(32'hFFFF_FFFF, 32'h0000_0001);   // carry ripples through every block
    run(32'h0FFF_FFFF, 32'h0000_0001);
    run(32'h0000_FFFF, 32'h0000_0001);   // crosses the low/high CLA boundary
    run(32'h7777_7777, 32'h8888_8889);
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] x, y;
      x = $urandom;
      y = $urandom;
      if (n % 4 == 1) y = ~x + 32'($urandom_range(0, 2));
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
