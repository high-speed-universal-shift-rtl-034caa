// usr_pkg: types shared by the universal shift register modules.
//
// The operation select S1 S0 follows the operation table of the design:
// 00 holds the stored word (memory), 01 shifts right (the RS serial input
// enters at the MSB and data moves towards bit 0), 10 shifts left (the LS
// serial input enters at bit 0 and data moves towards the MSB), 11 loads
// the parallel inputs.
package usr_pkg;

  typedef enum logic [1:0] {
    MODE_HOLD  = 2'b00,
    MODE_RIGHT = 2'b01,
    MODE_LEFT  = 2'b10,
    MODE_LOAD  = 2'b11
  } usr_mode_t;

endpackage
