// tb_out_latch: checks that the output latch takes its input during a
// normal cycle, shows it only once PHI2 has been high, and holds it through
// cycles with OP low.
module tb_out_latch;
  localparam int W = 32;
  logic phi1 = 0, phi2 = 0, op = 1;
  logic normal, shift;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  latch_ctrl u_ctrl (.phi1(phi1), .op(op), .normal(normal), .shift(shift));
  out_latch #(.W(W)) dut (.normal(normal), .phi2(phi2), .d(d), .q(q));

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

  initial begin
    logic [W-1:0] held;
    for (int n = 0; n < 30; n++) begin
      logic [W-1:0] prev_q;
      prev_q = q;
      op = (n % 3 != 2);
      d  = $urandom;
      phi1 = 1; #10;
      check(q, prev_q, "no change during PHI1");
      phi1 = 0; #5;
      d = ~d;                   // changes outside PHI1 must not be taken
      phi2 = 1; #10; phi2 = 0; #5;
      held = op ? ~d : prev_q;
      check(q, held, op ? "load" : "hold while OP low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
