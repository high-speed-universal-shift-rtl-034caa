// usr4_latch: 4-bit universal shift register built from pulsed latches.
//
// Each bit is a 4-to-1 multiplexer (usr_mux4) feeding a level-sensitive
// D latch (d_latch). The multiplexer, steered by mode (S1 S0), offers the
// latch its own value (memory), the next more significant bit (right
// shift, RS at the MSB), the next less significant bit (left shift, LS at
// bit 0) or the parallel input P. The latches replace the edge-triggered
// flip-flops of a conventional register: a latch is about half a
// master-slave flip-flop, so the register is smaller and faster.
//
// Interface and timing: pulse[i] enables the latch of bit i. The pulses
// must not overlap, and within one operation (a sweep) every bit gets one
// pulse: for a right shift bit 0 first and the MSB last, for a left shift
// the MSB first and bit 0 last, for a load or hold any order. Then each
// latch reads its neighbour before that neighbour is overwritten, and the
// word moves by exactly one place per sweep. mode, par_in, ls_in and rs_in
// must be stable from the first to the last pulse of a sweep. q is the
// parallel output; it settles bit by bit as the pulses pass.
//
// Multiplexer-plus-latch structure and the S1 S0 encoding follow the
// design; the pulse order per direction is this implementation's reading
// of the non-overlapping pulse scheme.
//
// Lint reports a combinational loop through q: in memory mode a latch's
// output returns to its own input through the multiplexer. The loop is
// only closed while that latch's pulse is high, and then it just holds the
// value it carries; it is part of the multiplexer-and-latch structure.
module usr4_latch
  import usr_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] pulse,
  input  usr_mode_t        mode,
  input  logic [WIDTH-1:0] par_in,
  input  logic             ls_in,
  input  logic             rs_in,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] d;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic from_right, from_left;
    if (i == WIDTH - 1) begin : g_msb
      assign from_right = rs_in;
    end else begin : g_mid_r
      assign from_right = q[i+1];
    end
    if (i == 0) begin : g_lsb
      assign from_left = ls_in;
    end else begin : g_mid_l
      assign from_left = q[i-1];
    end

    usr_mux4 u_mux (
      .sel    (mode),
      .d_hold (q[i]),
      .d_right(from_right),
      .d_left (from_left),
      .d_load (par_in[i]),
      .y      (d[i])
    );

    d_latch u_lat (
      .en(pulse[i]),
      .d (d[i]),
      .q (q[i])
    );
  end

endmodule
