// tb_csa_level: every one of the six carry-save levels must preserve the
// weighted sum of its bits modulo 2^32 (a bit in column c weighs 2^c). Each
// level is driven with random bit vectors, unrelated to any multiplication,
// so every adder sees every input pattern. The test also checks that the
// level plan ends with no column taller than two and counts the adders per
// level.
module tb_csa_level;
  import mult_pkg::*;
  localparam int MAXW = 400;
  logic [MAXW-1:0] din [1:6];
  logic [MAXW-1:0] dout[1:6];
  int checks = 0, failures = 0;

  for (genvar l = 1; l <= 6; l++) begin : g_lv
    logic [total(l)-1:0] o;
    csa_level #(.LEVEL(l)) dut (.din(din[l][total(l-1)-1:0]), .dout(o));
    assign dout[l] = MAXW'(o);
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PW-1:0] weighted(input int level, input logic [MAXW-1:0] v);
    logic [PW-1:0] s = '0;
    for (int c = 0; c < PW; c++)
      for (int i = 0; i < height(level, c); i++)
        if (v[offset(level, c) + i]) s += PW'(1) << c;
    return s;
  endfunction

  initial begin
    for (int c = 0; c < PW; c++) begin
      checks++;
      if (height(NLEVELS, c) > 2 || height(NLEVELS, c) < 1) begin
        failures++;
        $display("FAIL column %0d ends with height %0d", c, height(NLEVELS, c));
      end
    end
    for (int l = 1; l <= 6; l++) $display("level %0d: %0d adders, %0d bits out", l, adders_in_level(l), total(l));

    for (int n = 0; n < 2000; n++) begin
      for (int l = 1; l <= 6; l++) begin
        for (int w = 0; w < MAXW; w += 32) din[l][w +: 32] = $urandom;
        if (n == 0) din[l] = '1;
        if (n == 1) din[l] = '0;
      end
      #1;
      for (int l = 1; l <= 6; l++) begin
        checks++;
        if (weighted(l, dout[l]) != weighted(l - 1, din[l])) begin
          failures++;
          if (failures < 10)
            $display("FAIL level %0d: in %h out %h", l, weighted(l - 1, din[l]), weighted(l, dout[l]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
