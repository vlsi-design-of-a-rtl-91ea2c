// tb_mult16_pipe: end-to-end test of the pipelined multiplier at its full
// size, driven with a non-overlapping two-phase clock.
//
//  1. Isolated products: each of seven reference operand pairs (both signs
//     of 143 x 27, 1123 x 891 and -1123 x 891, and -32768 x -32768) is held
//     on the inputs; the product must not yet be on p after four cycles and
//     must be there after the fifth.
//  2. Pipelined products: a new operand pair every cycle (the seven pairs,
//     then random and corner pairs); p must show the product of the pair
//     applied four cycles earlier after every PHI2.
//  3. Scan shifting: with OP low a random stream is fed into each latch's
//     serial input; it must appear on the serial output exactly as many
//     cycles later as the latch is wide (144, 57, 70 and 64).
//  4. Scan readback: after a product has been computed, OP is lowered and
//     all four latches are read out serially. The testbench checks that the
//     bits of latches 1 and 2 add up (each weighted by 2^column) to the
//     product, that the P, G and carry bits in latches 3 and 4 match those
//     of the two adder operands, and that p holds during the scan.
//  5. After the scan the pipeline must multiply correctly again.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_mult16_pipe;
  import mult_pkg::*;

  logic          phi1 = 0, phi2 = 0, op = 1;
  logic [N-1:0]  a = '0, b = '0;
  logic [3:0]    l_in = '0, l_out;
  logic [PW-1:0] p;

  int checks = 0, failures = 0;
  int n_isolated = 0, n_pipelined = 0, n_neg_a = 0, n_neg_b = 0;
  int n_shift[4] = '{0, 0, 0, 0};
  int n_readback = 0, n_hold = 0, n_recover = 0;

  mult16_pipe dut (
    .phi1(phi1), .phi2(phi2), .op(op), .a(a), .b(b),
    .l_in(l_in), .l_out(l_out), .p(p)
  );

  localparam int LW[4] = '{L1_W, L2_W, L3_W, L4_W};

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle();
    phi1 = 1; #10; phi1 = 0; #5;
    phi2 = 1; #10; phi2 = 0; #5;
  endtask

  function automatic logic [PW-1:0] prod(input logic [N-1:0] x, input logic [N-1:0] y);
    return PW'(signed'(x) * signed'(y));
  endfunction

  task automatic check(input logic [PW-1:0] got, input logic [PW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // weighted sum of a flat bit vector laid out as after `level`
  function automatic logic [PW-1:0] weighted(input int level, input logic [255:0] v);
    logic [PW-1:0] s = '0;
    for (int c = 0; c < PW; c++)
      for (int i = 0; i < height(level, c); i++)
        if (v[offset(level, c) + i]) s += PW'(1) << c;
    return s;
  endfunction

  function automatic void operands(input logic [255:0] v, output logic [PW-1:0] x, output logic [PW-1:0] y);
    for (int c = 0; c < PW; c++) begin
      x[c] = v[offset(NLEVELS, c)];
      y[c] = (height(NLEVELS, c) == 2) ? v[offset(NLEVELS, c) + 1] : 1'b0;
    end
  endfunction

  logic [N-1:0] ref_a[7] = '{16'd27, 16'd27, -16'sd27, -16'sd27, 16'd891, 16'd891, 16'h8000};
  logic [N-1:0] ref_b[7] = '{16'd143, -16'sd143, 16'd143, -16'sd143, 16'd1123, -16'sd1123, 16'h8000};

  initial begin
    logic [N-1:0]  qa[$], qb[$];
    logic [255:0]  scan[4];
    logic [PW-1:0] held, x, y;

    // flush the pipeline
    op = 1;
    a = '0; b = '0;
    repeat (6) cycle();

    // 1. isolated products with the five-cycle latency
    for (int v = 0; v < 7; v++) begin
      logic [PW-1:0] old;
      old = p;
      a = ref_a[v]; b = ref_b[v];
      repeat (4) cycle();
      if (prod(a, b) != old) check(p, old, "product must not appear before cycle 5");
      cycle();
      check(p, prod(a, b), $sformatf("isolated %0d x %0d", signed'(a), signed'(b)));
      n_isolated++;
    end
    check(p, 32'h4000_0000, "-32768 x -32768");

    // 2. a new pair every cycle
    for (int n = 0; n < 600; n++) begin
      if (n < 7) begin a = ref_a[n]; b = ref_b[n]; end
      else if (n % 50 == 0) begin a = 16'h8000; b = 16'h7FFF; end
      else if (n % 50 == 1) begin a = 16'hFFFF; b = 16'h8000; end
      else begin a = $urandom; b = $urandom; end
      qa.push_back(a); qb.push_back(b);
      cycle();
      if (qa.size() == 5) begin
        logic [N-1:0] ea, eb;
        ea = qa.pop_front(); eb = qb.pop_front();
        check(p, prod(ea, eb), $sformatf("pipelined %h x %h", ea, eb));
        n_pipelined++;
        if (ea[N-1]) n_neg_a++;
        if (eb[N-1]) n_neg_b++;
      end
    end

    // 3. serial shifting through all four latches at once
    begin
      logic [3:0] stream[$];
      op = 0;
      for (int n = 0; n < 400; n++) begin
        l_in = 4'($urandom);
        stream.push_back(l_in);
        cycle();
        for (int k = 0; k < 4; k++) begin
          if (n >= LW[k] - 1) begin
            logic [3:0] s;
            s = stream[n - (LW[k] - 1)];
            checks++;
            if (l_out[k] !== s[k]) begin
              failures++;
              $display("FAIL latch %0d serial output at cycle %0d", k + 1, n);
            end
            n_shift[k]++;
          end
        end
      end
    end

    // 4. load one product into every latch, then scan them all out
    for (int v = 0; v < 20; v++) begin
      op = 1;
      if (v < 7) begin a = ref_a[v]; b = ref_b[v]; end
      else begin a = $urandom; b = $urandom; end
      repeat (5) cycle();
      held = p;
      check(held, prod(a, b), "product before scan");
      op = 0;
      l_in = '0;
      scan = '{default: '0};
      for (int n = 0; n < L1_W; n++) begin
        for (int k = 0; k < 4; k++) if (n < LW[k]) scan[k][n] = l_out[k];
        cycle();
      end
      check(p, held, "output held while scanning");
      n_hold++;
      check(weighted(3, scan[0]), prod(a, b), "latch 1 contents");
      check(weighted(NLEVELS, scan[1]), prod(a, b), "latch 2 contents");
      check(weighted(NLEVELS, scan[2]), prod(a, b), "latch 3 operands");
      check(weighted(NLEVELS, scan[3]), prod(a, b), "latch 4 operands");
      operands(scan[2], x, y);
      for (int i = 0; i < NBLK - 1; i++) begin
        logic [4:0] s;
        s = {1'b0, x[4*i +: 4]} + {1'b0, y[4*i +: 4]};
        checks++;
        if (scan[2][L2_W + i] !== s[4]) begin failures++; $display("FAIL latch 3 G of slice %0d", i); end
        if (i > 0) begin
          checks++;
          if (scan[2][L2_W + NPG_G + i - 1] !== &(x[4*i +: 4] | y[4*i +: 4])) begin
            failures++; $display("FAIL latch 3 P of slice %0d", i);
          end
        end
      end
      for (int i = 1; i < NBLK; i++) begin
        logic [32:0] lo;
        lo = ({1'b0, x} & ((33'd1 << (4*i)) - 1)) + ({1'b0, y} & ((33'd1 << (4*i)) - 1));
        checks++;
        if (scan[3][L2_W + i - 1] !== lo[4*i]) begin failures++; $display("FAIL latch 4 carry C%0d", 4*i); end
      end
      n_readback++;
    end

    // 5. normal operation again after scanning
    op = 1;
    for (int n = 0; n < 5; n++) begin
      a = $urandom; b = $urandom;
      repeat (5) cycle();
      check(p, prod(a, b), "product after scan");
      n_recover++;
    end

    $display("mechanisms: isolated=%0d pipelined=%0d neg_multiplier=%0d neg_multiplicand=%0d",
             n_isolated, n_pipelined, n_neg_a, n_neg_b);
    $display("            shift l1=%0d l2=%0d l3=%0d l4=%0d readback=%0d hold=%0d recover=%0d",
             n_shift[0], n_shift[1], n_shift[2], n_shift[3], n_readback, n_hold, n_recover);
    foreach (n_shift[k]) if (n_shift[k] == 0) failures++;
    if (n_isolated == 0 || n_pipelined == 0 || n_neg_a == 0 || n_neg_b == 0) failures++;
    if (n_readback == 0 || n_hold == 0 || n_recover == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
