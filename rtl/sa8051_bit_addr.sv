// Bit-address decoder of the SA8051 (the design's Set_Bit_rar step).
//
// An 8051 bit address selects one of 128 bits in internal RAM bytes 20H..2FH
// (bit address 00H..7FH) or a bit of a bit-addressable SFR (80H..FFH, SFRs
// at addresses that are multiples of 8). Combinational: from the bit address
// it returns the byte address that is loaded into the RAM address register
// (RAR) and the 3-bit index of the bit inside that byte. The mapping follows
// the design: bit 7 set -> byte = {bit[7:3], 000}; bit 7 clear -> byte =
// 20H + bit[6:3]; index = bit[2:0].
module sa8051_bit_addr (
  input  logic [7:0] bit_addr,
  output logic [7:0] rar,
  output logic [2:0] bit_index
);
  always_comb begin
    if (bit_addr[7]) rar = {bit_addr[7:3], 3'b000};
    else             rar = {4'b0010, bit_addr[6:3]};
    bit_index = bit_addr[2:0];
  end
endmodule
