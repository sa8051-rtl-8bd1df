// NC2P element (inverting, asymmetric C-element).
//
// State-holding cell used in place of an inverting C-element inside the
// S-element. Its behaviour follows the element's truth table: i0 = 0 forces
// q = 1; i0 = 1 and i1 = 1 force q = 0; i0 = 1 and i1 = 0 keep q. (One prose
// description of this cell swaps the two forced values; the truth table and
// the remark that the cell is an inverting C-element except for i0 = 0,
// i1 = 1 agree with each other, and are what is built.) Written as a latch
// that is transparent whenever a forcing condition holds, so synthesis
// reports a latch by design. No clock, no reset.
module nc2p (
  input  logic i0,
  input  logic i1,
  output logic q
);
  always_latch begin
    if (!i0 || i1) q = !i0;
  end
endmodule
