// pulse_gen: non-overlapping pulsed clocks for a pulsed-latch register.
//
// A pulsed-latch shift register gives every latch its own enable pulse,
// and only one pulse is high at any time, with a low duty cycle, so that a
// latch never captures a neighbour that is open at the same moment. This
// block derives those pulses from a fast reference clock: a slot counter
// walks through PHASES slots, each made of GAP_CYCLES cycles with every
// pulse low followed by PULSE_CYCLES cycles with one pulse high. All
// outputs are registered, so they are glitch-free and one-hot-or-zero.
//
// One pass through all phases is a sweep: one register operation. Pulses
// run from pulse[0] upward, or from pulse[PHASES-1] downward when reverse
// is set. The upward order suits a right shift (bit i reads bit i+1, so
// bit i must capture first); the downward order suits a left shift.
//
// Timing: a sweep lasts PHASES*(GAP_CYCLES+PULSE_CYCLES) clk cycles. It
// begins with load_window high during the first gap of phase 0: all pulses
// are low then, the previous sweep is complete, and the register's inputs
// (and reverse) may change. reverse is sampled at the last clock edge of
// the window and held for the rest of the sweep. After reset a sweep
// starts at once, beginning with its load window.
//
// The need for non-overlapping, low-duty pulses follows the design; the
// counter circuit, the direction-dependent order, the reset and the load
// window are this implementation's own.
module pulse_gen #(
  parameter int unsigned PHASES       = 16,
  parameter int unsigned PULSE_CYCLES = 1,
  parameter int unsigned GAP_CYCLES   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reverse,
  output logic [PHASES-1:0] pulse,
  output logic              load_window
);

  localparam int unsigned SLOT = GAP_CYCLES + PULSE_CYCLES;
  localparam int unsigned PW   = (PHASES > 1) ? $clog2(PHASES) : 1;
  localparam int unsigned SW   = (SLOT > 1) ? $clog2(SLOT) : 1;
  localparam logic [PW-1:0] LAST_PHASE = PW'(PHASES - 1);
  localparam logic [SW-1:0] LAST_SUB   = SW'(SLOT - 1);
  localparam logic [SW-1:0] GAP_END    = SW'(GAP_CYCLES);

  if (PHASES < 2 || GAP_CYCLES < 1 || PULSE_CYCLES < 1) begin : g_bad_params
    $error("pulse_gen needs PHASES >= 2, GAP_CYCLES >= 1 and PULSE_CYCLES >= 1");
  end

  logic [PW-1:0]     phase_q, phase_n;
  logic [SW-1:0]     sub_q, sub_n;
  logic              rev_q, rev_n;
  logic [PHASES-1:0] pulse_q, pulse_n;
  logic [PW-1:0]     idx;

  assign load_window = (phase_q == '0) && (sub_q < GAP_END);

  always_comb begin
    phase_n = phase_q;
    sub_n   = sub_q + 1'b1;
    if (sub_q == LAST_SUB) begin
      sub_n   = '0;
      phase_n = (phase_q == LAST_PHASE) ? '0 : phase_q + 1'b1;
    end
    rev_n   = load_window ? reverse : rev_q;
    idx     = rev_n ? (LAST_PHASE - phase_n) : phase_n;
    pulse_n = '0;
    if (sub_n >= GAP_END) pulse_n[idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= '0;
      sub_q   <= '0;
      rev_q   <= 1'b0;
      pulse_q <= '0;
    end else begin
      phase_q <= phase_n;
      sub_q   <= sub_n;
      rev_q   <= rev_n;
      pulse_q <= pulse_n;
    end
  end

  assign pulse = pulse_q;

  // Non-overlap: never more than one latch enable high.
  a_one_hot0 : assert property (@(posedge clk) $onehot0(pulse_q))
    else $error("pulse_gen: overlapping pulses %b", pulse_q);

endmodule
