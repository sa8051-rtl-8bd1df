// Muller C-element.
//
// Two inputs, one state-holding output: the output goes to 0 when both
// inputs are 0, to 1 when both are 1, and keeps its value otherwise. It is the
// basic join of asynchronous handshake logic; here it merges the two ROM
// request wires into one memory enable. Written as a level-sensitive latch
// that is open only while the inputs agree, so synthesis reports a latch:
// that is the element's intended state-holding behaviour. No clock, no reset;
// the output follows the inputs after a delta when they agree.
module c_element (
  input  logic i0,
  input  logic i1,
  output logic q
);
  always_latch begin
    if (i0 == i1) q = i0;
  end
endmodule
