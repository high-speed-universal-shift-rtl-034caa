// usr16_latch_tb: self-checking test of the 16-bit pulsed-latch universal shift register (four 4-bit slices).
//
// The bench plays the pulse generator itself: for every operation it sets
// mode and inputs while all latch enables are low, then raises one enable
// at a time with a gap between pulses, from bit 0 up for a right shift,
// from the MSB down for a left shift, in a random one of the two orders
// for hold and load. After each pulse it checks that the pulsed bit took
// its new value and that the bits not yet pulsed still hold the old one;
// after the sweep the whole word must match a reference model
// (hold / shift right with RS into the MSB / shift left with LS into bit 0
// / parallel load). Between sweeps it changes the inputs with all enables
// low and checks that the stored word does not move.
module usr16_latch_tb;
  import usr_pkg::*;

  localparam int unsigned W = 16;

  logic [W-1:0] pulse;
  usr_mode_t    mode;
  logic [W-1:0] par_in;
  logic         ls_in, rs_in;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int           checks = 0;
  int           failures = 0;
  int           n_mode [4];

  usr16_latch dut (
    .pulse(pulse), .mode(mode), .par_in(par_in), .ls_in(ls_in), .rs_in(rs_in), .q(q)
  );

  function automatic logic [W-1:0] next_word(input usr_mode_t m, input logic [W-1:0] cur,
                                             input logic [W-1:0] p, input logic ls,
                                             input logic rs);
    case (m)
      MODE_HOLD:  return cur;
      MODE_RIGHT: return {rs, cur[W-1:1]};
      MODE_LEFT:  return {cur[W-2:0], ls};
      default:    return p;
    endcase
  endfunction

  task automatic check_word(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  // One operation: a sweep of W non-overlapping pulses.
  task automatic do_op(input usr_mode_t m, input logic [W-1:0] p, input logic ls,
                       input logic rs);
    logic [W-1:0] nxt, partial;
    logic         down;
    mode = m; par_in = p; ls_in = ls; rs_in = rs;
    #2;
    nxt = next_word(m, model, p, ls, rs);
    case (m)
      MODE_RIGHT: down = 1'b0;
      MODE_LEFT:  down = 1'b1;
      default:    down = 1'($urandom);
    endcase
    partial = model;
    for (int k = 0; k < W; k++) begin
      int i;
      i = down ? W - 1 - k : k;
      pulse[i] = 1'b1;
      #1;
      pulse[i] = 1'b0;
      #1;
      partial[i] = nxt[i];
      check_word(partial, "during sweep");
    end
    model = nxt;
    n_mode[m]++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pulse = '0;
    mode  = MODE_HOLD; par_in = '0; ls_in = 1'b0; rs_in = 1'b0;
    #5;
    model = q;  // whatever the latches start with
    do_op(MODE_LOAD, W'($urandom), 1'b0, 1'b0);
    // Directed: walk a single one through the whole word in both directions.
    do_op(MODE_LOAD, W'(1), 1'b0, 1'b0);
    for (int k = 0; k < W; k++) do_op(MODE_LEFT, '0, 1'b0, 1'b0);
    check_word('0, "one shifted out at the MSB");
    do_op(MODE_RIGHT, '0, 1'b0, 1'b1);
    for (int k = 0; k < W - 1; k++) do_op(MODE_RIGHT, '0, 1'b0, 1'b0);
    check_word(W'(1), "one shifted in at the MSB reaches bit 0");
    // Random operations.
    for (int n = 0; n < 400; n++) begin
      do_op(usr_mode_t'($urandom_range(0, 3)), W'($urandom), 1'($urandom), 1'($urandom));
      // Inputs moving while every latch is closed must not disturb q.
      mode = usr_mode_t'($urandom_range(0, 3)); par_in = W'($urandom);
      ls_in = 1'($urandom); rs_in = 1'($urandom);
      #2;
      check_word(model, "closed latches hold");
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin
        failures++;
        $display("FAIL mode %0d never exercised", m);
      end
    end
    $display("operations: hold=%0d right=%0d left=%0d load=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
