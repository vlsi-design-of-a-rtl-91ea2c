// tb_lssd_latch: drives a 13-bit scannable latch with a two-phase clock.
// Checks parallel load (value only after PHI2, held through the next PHI1
// of a cycle with no strobe), serial shifting (the word moves one place per
// cycle toward bit 0, sin enters at the top, each bit appears on sout
// exactly W cycles after it entered) and that a loaded word can be read
// out serially.
module tb_lssd_latch;
  localparam int W = 13;
  logic phi1 = 0, phi2 = 0, op = 1;
  logic normal, shift;
  logic [W-1:0] d, q;
  logic sin = 0, sout;
  int checks = 0, failures = 0;

  latch_ctrl u_ctrl (.phi1(phi1), .op(op), .normal(normal), .shift(shift));
  lssd_latch #(.W(W)) dut (
    .normal(normal), .shift(shift), .phi2(phi2),
    .d(d), .sin(sin), .q(q), .sout(sout)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one clock cycle: PHI1 pulse, gap, PHI2 pulse, gap
  task automatic cycle();
    phi1 = 1; #10; phi1 = 0; #5;
    phi2 = 1; #10; phi2 = 0; #5;
  endtask

  initial begin
    logic [W-1:0] model;
    logic [W-1:0] word;
    logic [63:0]  stream;

    // parallel loads
    op = 1;
    for (int n = 0; n < 20; n++) begin
      logic [W-1:0] prev_q;
      prev_q = q;
      d = W'($urandom);
      phi1 = 1; #10;
      check(q, prev_q, "slave unchanged during PHI1");
      phi1 = 0; #5; phi2 = 1; #10; phi2 = 0; #5;
      check(q, d, "parallel load");
    end

    // shifting: the word moves toward bit 0, sin enters at the top
    model = q;
    op = 0;
    stream = {$urandom, $urandom};
    for (int n = 0; n < 40; n++) begin
      sin = stream[n];
      d   = W'($urandom);       // must be ignored while shifting
      cycle();
      model = {sin, model[W-1:1]};
      check(q, model, "shift");
      if (n >= W - 1) begin
        checks++;
        if (sout !== stream[n - (W - 1)]) begin
          failures++;
          $display("FAIL serial out at cycle %0d", n);
        end
      end
    end

    // load a word, then read it out serially
    op = 1;
    word = W'($urandom);
    d = word;
    cycle();
    op = 0;
    sin = 0;
    for (int n = 0; n < W; n++) begin
      checks++;
      if (sout !== word[n]) begin
        failures++;
        $display("FAIL readback bit %0d", n);
      end
      cycle();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
