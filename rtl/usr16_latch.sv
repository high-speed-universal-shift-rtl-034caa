// usr16_latch: 16-bit universal shift register from four 4-bit latch
// registers.
//
// SLICES copies of usr4_latch sit side by side, slice 0 holding the least
// significant bits. They are joined through their serial inputs: the LS
// input of slice k is the top bit of slice k-1 and its RS input is the
// bottom bit of slice k+1; slice 0 takes the register's LS and the last
// slice the register's RS. Mode and parallel inputs go to every slice.
//
// Interface and timing as for usr4_latch, over SLICES*SLICE_WIDTH bits:
// pulse[i] enables bit i, the pulses must not overlap, and a right shift
// needs them in rising bit order across the whole word, a left shift in
// falling order. Every latch therefore has a pulse of its own. Building
// the wide register from 4-bit slices follows the design; giving the
// slices separate pulses instead of the same four is this
// implementation's choice, because with shared pulses the boundary bits
// of adjacent slices would capture at the same time as the bits they
// read, and a shift across a slice boundary would skip a bit.
module usr16_latch
  import usr_pkg::*;
#(
  parameter int unsigned SLICES      = 4,
  parameter int unsigned SLICE_WIDTH = 4,
  localparam int unsigned WIDTH      = SLICES * SLICE_WIDTH
) (
  input  logic [WIDTH-1:0] pulse,
  input  usr_mode_t        mode,
  input  logic [WIDTH-1:0] par_in,
  input  logic             ls_in,
  input  logic             rs_in,
  output logic [WIDTH-1:0] q
);

  for (genvar k = 0; k < SLICES; k++) begin : g_slice
    logic ls_k, rs_k;
    if (k == 0) begin : g_first
      assign ls_k = ls_in;
    end else begin : g_ls_link
      assign ls_k = q[k*SLICE_WIDTH-1];
    end
    if (k == SLICES - 1) begin : g_last
      assign rs_k = rs_in;
    end else begin : g_rs_link
      assign rs_k = q[(k+1)*SLICE_WIDTH];
    end

    usr4_latch #(.WIDTH(SLICE_WIDTH)) u_usr4 (
      .pulse (pulse [k*SLICE_WIDTH +: SLICE_WIDTH]),
      .mode  (mode),
      .par_in(par_in[k*SLICE_WIDTH +: SLICE_WIDTH]),
      .ls_in (ls_k),
      .rs_in (rs_k),
      .q     (q     [k*SLICE_WIDTH +: SLICE_WIDTH])
    );
  end

endmodule
