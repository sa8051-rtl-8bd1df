// Regular/irregular opcode classifier of the SA8051 decoder.
//
// The 8051 opcode map is regular in its lower rows: for low nibbles 8..F the
// sixteen columns hold the same operation applied to R0..R7, low nibbles 6
// and 7 the same operation on @R0/@R1, and low nibbles 4 and 5 mostly the same
// operation on an immediate or a direct operand. This combinational block
// returns 1 for an opcode in that regular part, so the decoder can execute it
// with one generic read-operands / execute / write-result sequence, and 0 for
// the irregular rest. The classification table is the design's own:
//   low 0..3                         -> irregular
//   low 4, high 0,1,7,8,A,B,C,D,E,F  -> irregular
//   low 5, high A,B                  -> irregular
//   low 6/7, high D                  -> irregular
//   everything else                  -> regular
module sa8051_judge_regular (
  input  logic [7:0] ir,
  output logic       regular
);
  logic [3:0] l_ir, h_ir;
  assign l_ir = ir[3:0];
  assign h_ir = ir[7:4];

  always_comb begin
    unique case (l_ir)
      4'd0, 4'd1, 4'd2, 4'd3: regular = 1'b0;
      4'd4: regular = !(h_ir inside {4'd0, 4'd1, 4'd7, 4'd8, 4'd10, 4'd11, 4'd12, 4'd13, 4'd14, 4'd15});
      4'd5: regular = !(h_ir inside {4'd10, 4'd11});
      4'd6, 4'd7: regular = (h_ir != 4'd13);
      default: regular = 1'b1;
    endcase
  end
endmodule
