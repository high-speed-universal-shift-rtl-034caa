// usr_workloads_tb: runs the two register sizes the design is evaluated
// at, end to end through hs_usr_top: the 4-bit register (one slice, four
// pulse phases) and the 16-bit register (four slices, sixteen phases), the
// latter also with stretched pulses and gaps (2-cycle pulses, 3-cycle
// gaps) to show that the protocol does not depend on the pulse timing.
// See hs_usr_bench for what is checked.
module usr_workloads_tb;

  logic d4, d16, d16s;
  int   c4, f4, c16, f16, c16s, f16s;

  hs_usr_bench #(.SLICES(1)) b4 (.done(d4), .checks(c4), .failures(f4));
  hs_usr_bench #(.SLICES(4)) b16 (.done(d16), .checks(c16), .failures(f16));
  hs_usr_bench #(.SLICES(4), .PULSE_CYCLES(2), .GAP_CYCLES(3), .HALF_PERIOD(3)) b16s (
    .done(d16s), .checks(c16s), .failures(f16s));

  initial begin : watchdog
    #5ms;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16 + c16s, f4 + f16 + f16s + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d4 && d16 && d16s);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16 + c16s, f4 + f16 + f16s);
    $finish;
  end

endmodule
