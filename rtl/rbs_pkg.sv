// rbs_pkg: constants and types shared by the reversible bidirectional barrel
// shifter. It fixes the encoding of the MODE input (the three shift kinds are
// the design's; their two-bit codes are this design's own choice) and the
// width of the garbage-output bus as a function of the word width N.
package rbs_pkg;

  // Shift kind selected by MODE. Code 2'b11 also rotates: only MODE[1] is
  // looked at to decide "rotate", so no code is left without a meaning.
  typedef enum logic [1:0] {
    MODE_LOGICAL = 2'b00,  // vacated positions filled with 0
    MODE_ARITH   = 2'b01,  // right shift copies the sign bit in, left is logical
    MODE_ROTATE  = 2'b10,  // bits leaving one end re-enter at the other
    MODE_ROT_ALT = 2'b11   // same as MODE_ROTATE
  } mode_e;

  // The DIR input is a plain bit: 1 shifts towards the MSB (left), 0 towards
  // the LSB (right). The control unit passes it on as the mirror control.

  // Garbage bits left by the control unit's gates.
  localparam int unsigned CTRL_GARBAGE = 4;

  // Garbage bits left by the shift network: each of the log2(N) stages leaves
  // one Fredkin output per bit plus one per wrapped bit (2^stage of them).
  function automatic int unsigned net_garbage(int unsigned n);
    return n * $clog2(n) + (n - 1);
  endfunction

  function automatic int unsigned total_garbage(int unsigned n);
    return CTRL_GARBAGE + net_garbage(n);
  endfunction

endpackage
