// pulse_gen_bench: checks one pulse_gen configuration against a cycle
// model; used twice by pulse_gen_tb with different parameters.
//
// After reset, clock edge t puts the generator in slot t mod L of a sweep,
// L = PHASES*(GAP_CYCLES+PULSE_CYCLES). In slot s the phase is
// s / (GAP_CYCLES+PULSE_CYCLES) and the position in it s mod that; the
// first GAP_CYCLES positions have every pulse low, the rest have exactly
// the phase's pulse high (pulse[phase], or pulse[PHASES-1-phase] for a
// reversed sweep). load_window is high in the gap of phase 0. The bench
// picks a random direction in every load window and compares pulse and
// load_window with this model at every falling clock edge.
module pulse_gen_bench #(
  parameter int unsigned PHASES       = 16,
  parameter int unsigned PULSE_CYCLES = 1,
  parameter int unsigned GAP_CYCLES   = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   fwd_sweeps,
  output int   rev_sweeps
);

  localparam int unsigned SLOT = GAP_CYCLES + PULSE_CYCLES;
  localparam int unsigned L    = PHASES * SLOT;

  logic              reverse;
  logic [PHASES-1:0] pulse;
  logic              load_window;

  pulse_gen #(.PHASES(PHASES), .PULSE_CYCLES(PULSE_CYCLES), .GAP_CYCLES(GAP_CYCLES)) dut (
    .clk(clk), .rst_n(rst_n), .reverse(reverse), .pulse(pulse), .load_window(load_window)
  );

  int   t;
  logic sweep_rev;

  initial begin
    checks = 0; failures = 0; fwd_sweeps = 0; rev_sweeps = 0;
    reverse = 1'b0; sweep_rev = 1'b0; t = 0;
  end

  always @(posedge clk) if (rst_n) t <= t + 1;

  always @(negedge clk) begin
    int unsigned s, ph, sub;
    logic [PHASES-1:0] exp_pulse;
    logic exp_win;
    s   = t % L;
    ph  = s / SLOT;
    sub = s % SLOT;
    exp_win   = (ph == 0) && (sub < GAP_CYCLES);
    exp_pulse = '0;
    if (sub >= GAP_CYCLES) exp_pulse[sweep_rev ? PHASES-1-ph : ph] = 1'b1;
    checks++;
    if (pulse !== exp_pulse || load_window !== exp_win) begin
      failures++;
      $display("FAIL P=%0d t=%0d pulse=%b exp %b window=%0b exp %0b",
               PHASES, t, pulse, exp_pulse, load_window, exp_win);
    end
    // Choose the direction of the next sweep in its load window.
    if (rst_n && ph == 0 && sub == 0) begin
      sweep_rev = 1'($urandom);
      reverse   = sweep_rev;
      if (sweep_rev) rev_sweeps++; else fwd_sweeps++;
    end else if (rst_n && ph != 0) begin
      // Outside the window the input must be ignored.
      reverse = 1'($urandom);
    end
  end

endmodule
