// pulse_gen_tb: self-checking test of the non-overlapping pulse generator.
//
// Runs two configurations side by side, the default (16 phases, one-cycle
// pulses and gaps) and a 4-phase one with 2-cycle pulses and 3-cycle gaps,
// each against a cycle model (see pulse_gen_bench). Both directions must
// occur, and the reverse input is toggled randomly outside the load window
// to show that it only takes effect at the start of a sweep.
module pulse_gen_tb;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  int   c0, f0, fw0, rv0, c1, f1, fw1, rv1;
  int   checks, failures;

  always #5 clk = ~clk;

  pulse_gen_bench #(.PHASES(16), .PULSE_CYCLES(1), .GAP_CYCLES(1)) b0 (
    .clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .fwd_sweeps(fw0), .rev_sweeps(rv0));
  pulse_gen_bench #(.PHASES(4), .PULSE_CYCLES(2), .GAP_CYCLES(3)) b1 (
    .clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .fwd_sweeps(fw1), .rev_sweeps(rv1));

  task automatic finish_report();
    checks   = c0 + c1 + 4;
    failures = f0 + f1;
    if (fw0 == 0 || rv0 == 0) failures++;
    if (fw1 == 0 || rv1 == 0) failures++;
    $display("sweeps: 16-phase fwd=%0d rev=%0d, 4-phase fwd=%0d rev=%0d", fw0, rv0, fw1, rv1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog expired");
    f0++;
    finish_report();
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    @(negedge clk);
    finish_report();
  end

endmodule
