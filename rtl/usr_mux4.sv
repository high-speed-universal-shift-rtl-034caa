// usr_mux4: the 4-to-1 multiplexer in front of each storage bit of the
// universal shift register.
//
// sel (S1 S0) picks what the bit's latch will store on its next pulse:
// its own value (hold), its right-shift source (the next more significant
// bit, or RS at the MSB), its left-shift source (the next less significant
// bit, or LS at bit 0), or its parallel input. Purely combinational.
module usr_mux4
  import usr_pkg::*;
(
  input  usr_mode_t sel,
  input  logic      d_hold,
  input  logic      d_right,
  input  logic      d_left,
  input  logic      d_load,
  output logic      y
);

  always_comb begin
    unique case (sel)
      MODE_HOLD:  y = d_hold;
      MODE_RIGHT: y = d_right;
      MODE_LEFT:  y = d_left;
      MODE_LOAD:  y = d_load;
      default:    y = d_hold;
    endcase
  end

endmodule
