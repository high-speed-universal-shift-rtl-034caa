// hs_usr_top: high-speed universal shift register, pulsed-latch version.
//
// The complete register: pulse_gen turns a fast reference clock into
// SLICES*SLICE_WIDTH non-overlapping, low-duty latch pulses, and
// usr16_latch stores the word in one D latch per bit, each behind a
// 4-to-1 multiplexer. mode (S1 S0) selects hold, right shift (RS enters
// at the MSB), left shift (LS enters at bit 0) or parallel load.
//
// Timing: one operation takes one sweep of the pulse generator,
// WIDTH*(GAP_CYCLES+PULSE_CYCLES) clk cycles (32 with the defaults).
// load_window is high in the first cycle(s) of every sweep, when all
// latches are closed: change mode, par_in, ls_in and rs_in only then. The
// operation set during a window is complete when the next window opens,
// and q holds its result from then on. For a left shift the pulses run
// from the MSB down, otherwise from bit 0 up. pulse is brought out for
// observation only.
//
// The latch-based register, its slices and the operation table follow the
// design; the pulse generator's circuit and the load-window protocol are
// this implementation's own.
module hs_usr_top
  import usr_pkg::*;
#(
  parameter int unsigned SLICES       = 4,
  parameter int unsigned SLICE_WIDTH  = 4,
  parameter int unsigned PULSE_CYCLES = 1,
  parameter int unsigned GAP_CYCLES   = 1,
  localparam int unsigned WIDTH       = SLICES * SLICE_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  usr_mode_t        mode,
  input  logic [WIDTH-1:0] par_in,
  input  logic             ls_in,
  input  logic             rs_in,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] pulse,
  output logic             load_window
);

  pulse_gen #(
    .PHASES      (WIDTH),
    .PULSE_CYCLES(PULSE_CYCLES),
    .GAP_CYCLES  (GAP_CYCLES)
  ) u_pulse_gen (
    .clk        (clk),
    .rst_n      (rst_n),
    .reverse    (mode == MODE_LEFT),
    .pulse      (pulse),
    .load_window(load_window)
  );

  usr16_latch #(
    .SLICES     (SLICES),
    .SLICE_WIDTH(SLICE_WIDTH)
  ) u_usr (
    .pulse (pulse),
    .mode  (mode),
    .par_in(par_in),
    .ls_in (ls_in),
    .rs_in (rs_in),
    .q     (q)
  );

endmodule
