// usr_mux4_tb: exhaustive test of the bit multiplexer.
//
// Applies all four selects with all sixteen input combinations and checks
// that the output is hold, right-shift source, left-shift source or
// parallel bit as the S1 S0 table requires.
module usr_mux4_tb;
  import usr_pkg::*;

  usr_mode_t sel;
  logic      d_hold, d_right, d_left, d_load, y;
  int        checks = 0;
  int        failures = 0;

  usr_mux4 dut (.sel(sel), .d_hold(d_hold), .d_right(d_right), .d_left(d_left),
                .d_load(d_load), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 16; v++) begin
        logic exp;
        sel = usr_mode_t'(s);
        {d_load, d_left, d_right, d_hold} = 4'(v);
        #1;
        // Expected output: the input whose position in {load,left,right,hold}
        // equals the select value.
        exp = v[s];
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL sel=%0d inputs=%b y=%0b expected %0b", s, 4'(v), y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
