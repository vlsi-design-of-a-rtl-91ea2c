// tb_mult16_reference_session: replays the reference logic-simulation
// session of the multiplier. After five cycles with zero operands, the seven
// reference pairs are applied on seven consecutive cycles and then held.
// After every cycle the output is compared with the recorded upper and lower
// product halves (phigh, plow): zero for the first four cycles, then the
// seven products in order, one per cycle, starting in the fifth cycle.
module tb_mult16_reference_session;
  logic        phi1 = 0, phi2 = 0, op = 1;
  logic [15:0] a = '0, b = '0;
  logic [3:0]  l_in = '0, l_out;
  logic [31:0] p;
  int checks = 0, failures = 0;

  mult16_pipe dut (
    .phi1(phi1), .phi2(phi2), .op(op), .a(a), .b(b),
    .l_in(l_in), .l_out(l_out), .p(p)
  );

  // operands as entered (a = multiplier "ain", b = multiplicand "bin")
  logic [15:0] va[7] = '{16'd27, 16'd27, 16'd65509, 16'd65509, 16'd891, 16'd64413, 16'd32768};
  logic [15:0] vb[7] = '{16'd143, 16'd65393, 16'd143, 16'd65393, 16'd1123, 16'd891, 16'd32768};
  // recorded outputs, as unsigned decimal halves
  int exp_hi[11] = '{0, 0, 0, 0, 0, 65535, 65535, 0, 15, 65520, 16384};
  int exp_lo[11] = '{0, 0, 0, 0, 3861, 61675, 61675, 3861, 17553, 47983, 0};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle();
    phi1 = 1; #10; phi1 = 0; #5;
    phi2 = 1; #10; phi2 = 0; #5;
  endtask

  initial begin
    repeat (5) cycle();              // initialisation with zero operands
    for (int n = 0; n < 11; n++) begin
      if (n < 7) begin a = va[n]; b = vb[n]; end
      cycle();
      checks++;
      if (int'(p[31:16]) != exp_hi[n] || int'(p[15:0]) != exp_lo[n]) begin
        failures++;
        $display("FAIL cycle %0d: phigh=%0d plow=%0d, recorded %0d %0d",
                 n + 1, p[31:16], p[15:0], exp_hi[n], exp_lo[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
