// d_latch_tb: self-checking test of the D latch.
//
// Drives en and d with timed steps and checks that q follows d while en
// is high (transparent) and keeps the value it had when en fell while en
// is low (memory), including d changing during the hold.
module d_latch_tb;

  logic en, d, q;
  int   checks = 0;
  int   failures = 0;

  d_latch dut (.en(en), .d(d), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held;
    en = 1'b1; d = 1'b0; #5;
    check(1'b0, "transparent 0");
    d = 1'b1; #5;
    check(1'b1, "transparent 1");
    for (int n = 0; n < 200; n++) begin
      logic v;
      v = 1'($urandom);
      en = 1'b1; d = v; #3;
      check(v, "open follows d");
      en = 1'b0; #2;
      held = v;
      for (int k = 0; k < 4; k++) begin
        d = 1'($urandom); #2;
        check(held, "closed holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
