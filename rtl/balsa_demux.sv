// Two-output de-multiplexer cell of the handshake-circuit library.
//
// The input d is steered to q1 when sel = 1 and to q0 when sel = 0; the
// output not selected stays 0. It is a one-bit cell, as used inside steering
// components such as a case statement that passes an activation to one of
// several commands. Written as two AND terms; purely combinational.
//
// In the processor it steers the execute activation of each instruction to
// either the regular or the irregular execution sequences, selected by the
// decoder's regular/irregular classification.
module balsa_demux (
  input  logic d,
  input  logic sel,
  output logic q0,
  output logic q1
);
  assign q0 = d & ~sel;
  assign q1 = d & sel;
endmodule
