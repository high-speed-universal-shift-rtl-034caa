// hs_usr_top_tb: end-to-end test of the complete pulsed-latch universal
// shift register at its default size (16 bits, one-cycle pulses and gaps).
//
// The bench waits for load_window at every falling clock edge. In each
// window it first checks the word left by the previous operation against
// a reference model and the distance since the previous window (one sweep,
// 16*(1+1) = 32 cycles), then applies the next operation. It also watches
// the latch pulses: never two at once, every bit pulsed once per sweep,
// rising order for right shifts and falling order for left shifts.
//
// Sequence: parallel load; serial-in/parallel-out (16 right shifts through
// RS, then the word is read in parallel); parallel-in/serial-out (a load,
// then 16 left shifts while the MSB is read as the serial output); a
// left-shift serial input through LS; then random operations. Each
// mechanism (hold, right shift, left shift, load, forward sweep, reversed
// sweep, serial-in and serial-out) is counted, and one that never
// happened counts as a failure.
module hs_usr_top_tb;
  import usr_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned SWEEP = W * 2;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  usr_mode_t    mode;
  logic [W-1:0] par_in;
  logic         ls_in, rs_in;
  logic [W-1:0] q;
  logic [W-1:0] pulse;
  logic         load_window;

  int checks = 0;
  int failures = 0;
  int n_mode [4];
  int n_fwd = 0, n_rev = 0, n_sipo = 0, n_piso = 0;

  always #5 clk = ~clk;

  hs_usr_top dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .par_in(par_in), .ls_in(ls_in), .rs_in(rs_in),
    .q(q), .pulse(pulse), .load_window(load_window)
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

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ---- pulse monitor ------------------------------------------------
  usr_mode_t    cur_mode;
  logic [W-1:0] seen;
  int           order [$];
  int           cycle = 0;
  int           last_window = -1;

  logic [W-1:0] prev_pulse = '0;

  always @(negedge clk) begin
    cycle++;
    if (rst_n && pulse != '0) begin
      checks++;
      if (!$onehot(pulse)) fail($sformatf("overlapping pulses %b", pulse));
      for (int i = 0; i < W; i++) begin
        if (pulse[i] && !prev_pulse[i]) begin
          if (seen[i]) fail($sformatf("bit %0d pulsed twice in a sweep", i));
          seen[i] = 1'b1;
          order.push_back(i);
        end
      end
    end
    prev_pulse = pulse;
  end

  // Called in each load window: checks the finished sweep's pulses.
  task automatic close_sweep();
    logic up, down;
    checks++;
    if (seen != '1) fail($sformatf("sweep pulsed only %b", seen));
    up = 1'b1; down = 1'b1;
    for (int k = 0; k < order.size(); k++) begin
      if (order[k] != k) up = 1'b0;
      if (order[k] != W - 1 - k) down = 1'b0;
    end
    checks++;
    if (cur_mode == MODE_LEFT && !down) fail("left shift sweep not in falling order");
    if (cur_mode != MODE_LEFT && !up) fail("sweep not in rising order");
    if (up) n_fwd++;
    if (down) n_rev++;
    seen = '0;
    order.delete();
  endtask

  // ---- operation driver ---------------------------------------------
  logic [W-1:0] model;
  logic         have_model = 1'b0;

  // Waits for the next load window, checks the previous operation and
  // applies a new one. Returns the word the previous operation left.
  task automatic op(input usr_mode_t m, input logic [W-1:0] p, input logic ls,
                    input logic rs, output logic [W-1:0] prev_q);
    // Leave the current window, then wait for the start of the next one.
    do @(negedge clk); while (load_window);
    while (!load_window) @(negedge clk);
    if (last_window >= 0) begin
      checks++;
      if (cycle - last_window != SWEEP)
        fail($sformatf("sweep took %0d cycles, expected %0d", cycle - last_window, SWEEP));
      close_sweep();
    end else begin
      // Pulses seen before the first window belong to no operation.
      seen = '0;
      order.delete();
    end
    last_window = cycle;
    if (have_model) begin
      checks++;
      if (q !== model) fail($sformatf("q=%h expected %h (after mode %0d)", q, model, cur_mode));
    end
    prev_q = q;
    model = next_word(m, have_model ? model : q, p, ls, rs);
    have_model = 1'b1;
    mode = m; par_in = p; ls_in = ls; rs_in = rs;
    cur_mode = m;
    n_mode[m]++;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] word, got, dummy;
    mode = MODE_HOLD; par_in = '0; ls_in = 1'b0; rs_in = 1'b0;
    seen = '0; cur_mode = MODE_HOLD;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    seen = '0;
    order.delete();

    // The first sweep after reset: a parallel load (nothing to check yet).
    op(MODE_LOAD, 16'hA5C3, 1'b0, 1'b0, dummy);

    // Serial in, parallel out: 16 bits through RS, LSB first.
    word = W'($urandom);
    for (int k = 0; k < W; k++) op(MODE_RIGHT, '0, 1'b0, word[k], dummy);
    op(MODE_HOLD, '0, 1'b0, 1'b0, got);
    checks++;
    if (got !== word) fail($sformatf("serial-in word %h, expected %h", got, word));
    else n_sipo++;

    // Parallel in, serial out through the MSB with left shifts.
    word = W'($urandom);
    op(MODE_LOAD, word, 1'b0, 1'b0, dummy);
    for (int k = 0; k < W; k++) begin
      op(MODE_LEFT, '0, 1'($urandom), 1'b0, got);
      checks++;
      if (got[W-1] !== word[W-1-k]) fail($sformatf("serial-out bit %0d wrong", k));
      else if (k == W - 1) n_piso++;
    end

    // Random operations.
    for (int n = 0; n < 300; n++)
      op(usr_mode_t'($urandom_range(0, 3)), W'($urandom), 1'($urandom), 1'($urandom), dummy);
    op(MODE_HOLD, '0, 1'b0, 1'b0, dummy);  // checks the last random operation

    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_mode[3] == 0)
      fail("an operation never happened");
    checks++;
    if (n_fwd == 0 || n_rev == 0 || n_sipo == 0 || n_piso == 0)
      fail("a sweep order or serial conversion never happened");
    $display("operations: hold=%0d right=%0d left=%0d load=%0d", n_mode[0], n_mode[1],
             n_mode[2], n_mode[3]);
    $display("sweeps: rising=%0d falling=%0d; serial-in=%0d serial-out=%0d", n_fwd, n_rev,
             n_sipo, n_piso);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
