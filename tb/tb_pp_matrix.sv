// tb_pp_matrix: the partial-product matrix must add up to the signed
// product. For random and corner operand pairs the testbench weights every
// bit of the flat vector by 2^column (column layout from mult_pkg), sums
// them modulo 2^32 and compares with a*b computed as signed integers. It
// also checks that no column is taller than 16.
module tb_pp_matrix;
  import mult_pkg::*;
  logic [N-1:0] a, b;
  logic [total(0)-1:0] pp;
  int checks = 0, failures = 0;

  pp_matrix dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PW-1:0] weighted(input logic [total(0)-1:0] v);
    logic [PW-1:0] s = '0;
    for (int c = 0; c < PW; c++)
      for (int i = 0; i < height(0, c); i++)
        if (v[offset(0, c) + i]) s += PW'(1) << c;
    return s;
  endfunction

  task automatic run(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [PW-1:0] e;
    a = x; b = y;
    #1;
    e = PW'(signed'(x) * signed'(y));
    checks++;
    if (weighted(pp) != e) begin
      failures++;
      $display("FAIL a=%h b=%h matrix sums to %h expected %h", x, y, weighted(pp), e);
    end
  endtask

  initial begin
    for (int c = 0; c < PW; c++) begin
      checks++;
      if (height(0, c) > 16) failures++;
    end
    run(16'd27, 16'd143);
    run(16'd27, -16'sd143);
    run(-16'sd27, 16'd143);
    run(-16'sd27, -16'sd143);
    run(16'd891, 16'd1123);
    run(-16'sd1123, 16'd891);
    run(16'h8000, 16'h8000);
    run(16'h8000, 16'h7FFF);
    run(16'hFFFF, 16'hFFFF);
    for (int n = 0; n < 3000; n++) run(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
