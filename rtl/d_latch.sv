// d_latch: level-sensitive 1-bit D latch, the storage element of the
// pulsed-latch shift register.
//
// While en is high the latch is transparent and q follows d; while en is
// low q keeps the last value it had when en fell. In the register, en is
// one of the short non-overlapping pulses from pulse_gen, so each latch is
// open only for its own brief window.
//
// Interface: en, d in; q out. No reset: the register is initialised by a
// parallel load. The behaviour follows the latch description of the
// design; writing it as a behavioural always_latch instead of the gate
// circuit is this implementation's choice.
//
// The tools report this process as a latch. That is intended: the latch is
// the point of the design. When the latch sits in the register, where its
// d comes back from q through the hold path of the multiplexer, lint may
// instead say that it found no latch here; synthesis still infers one
// latch bit per instance.
module d_latch (
  input  logic en,
  input  logic d,
  output logic q
);

  always_latch begin
    if (en) q = d;
  end

endmodule
