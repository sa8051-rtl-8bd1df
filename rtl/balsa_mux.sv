// Two-input multiplexer cell of the handshake-circuit library.
//
// q = d0 when sel = 0 and q = d1 when sel = 1, per the cell's truth table,
// for a WIDTH-bit data path. The gate-level form of the cell is a NAND-NAND
// sum of products; here it is written as the equivalent combinational
// selection and left to synthesis. In the processor it selects the source of
// the program address register: the program counter, or the 16-bit result
// of the ALU for MOVC.
module balsa_mux #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] q
);
  assign q = sel ? d1 : d0;
endmodule
