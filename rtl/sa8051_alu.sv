// SA8051 arithmetic and logic unit.
//
// Combinational. Three byte inputs (src_1..src_3) and the carry and
// auxiliary-carry flags come in; two byte results and the CY/AC/OV flags go
// out, as the design's ALU port table lists them. Most operations use src_1
// and src_2 and produce result_1. The 16-bit address operations used by MOVC,
// JMP @A+DPTR and relative branches take a 16-bit base as {src_3,src_2} and
// return {result_2,result_1}; XCHD returns both exchanged bytes.
//
// Addition and subtraction share one adder: SUBB adds the inverted src_2 with
// the inverted carry-in and inverts the carries that come out, which is how
// the design combines ADD and SUB into one shared procedure. The adder is
// split at bit 3 (AC) and bit 6 (for OV). Flags not affected by an operation
// are passed through unchanged from src_cy/src_ac, OV returns 0 for those.
// The operation list and encoding are this design's own (see sa8051_pkg).
module sa8051_alu
  import sa8051_pkg::*;
(
  input  alu_op_e    alu_op,
  input  logic [7:0] src_1,
  input  logic [7:0] src_2,
  input  logic [7:0] src_3,
  input  logic       src_cy,
  input  logic       src_ac,
  output logic [7:0] result_1,
  output logic [7:0] result_2,
  output logic       result_cy,
  output logic       result_ac,
  output logic       result_ov
);

  // Shared adder: a + b + cin, returning {ov, ac, cy, sum}.
  function automatic logic [10:0] add8(input logic [7:0] a, input logic [7:0] b, input logic cin);
    logic [4:0] lo;
    logic [3:0] mid;
    logic [1:0] hi;
    lo  = {1'b0, a[3:0]} + {1'b0, b[3:0]} + {4'd0, cin};
    mid = {1'b0, a[6:4]} + {1'b0, b[6:4]} + {3'd0, lo[4]};
    hi  = {1'b0, a[7]}   + {1'b0, b[7]}   + {1'b0, mid[3]};
    return {hi[1] ^ mid[3], lo[4], hi[1], hi[0], mid[2:0], lo[3:0]};
  endfunction

  logic [10:0] sum;
  logic        sub;
  logic [8:0]  da_t;
  logic [15:0] wide;

  always_comb begin
    sub       = (alu_op == ALU_SUBB) || (alu_op == ALU_CMP);
    // One adder for ADD/ADDC/SUBB/CMP.
    unique case (alu_op)
      ALU_ADD:  sum = add8(src_1, src_2, 1'b0);
      ALU_ADDC: sum = add8(src_1, src_2, src_cy);
      ALU_SUBB: sum = add8(src_1, ~src_2, ~src_cy);
      ALU_CMP:  sum = add8(src_1, ~src_2, 1'b1);
      default:  sum = add8(src_1, src_2, 1'b0);
    endcase

    result_1  = src_1;
    result_2  = src_2;
    result_cy = src_cy;
    result_ac = src_ac;
    result_ov = 1'b0;
    da_t      = '0;
    wide      = '0;

    unique case (alu_op)
      ALU_ADD, ALU_ADDC, ALU_SUBB: begin
        result_1  = sum[7:0];
        result_cy = sum[8] ^ sub;
        result_ac = sum[9] ^ sub;
        result_ov = sum[10];
      end
      ALU_CMP: begin
        result_1  = sum[7:0];
        result_cy = ~sum[8];
      end
      ALU_INC:  result_1 = src_1 + 8'd1;
      ALU_DEC:  result_1 = src_1 - 8'd1;
      ALU_ANL:  result_1 = src_1 & src_2;
      ALU_ORL:  result_1 = src_1 | src_2;
      ALU_XRL:  result_1 = src_1 ^ src_2;
      ALU_RL:   result_1 = {src_1[6:0], src_1[7]};
      ALU_RLC: begin
        result_1  = {src_1[6:0], src_cy};
        result_cy = src_1[7];
      end
      ALU_RR:   result_1 = {src_1[0], src_1[7:1]};
      ALU_RRC: begin
        result_1  = {src_cy, src_1[7:1]};
        result_cy = src_1[0];
      end
      ALU_SWAP: result_1 = {src_1[3:0], src_1[7:4]};
      ALU_DA: begin
        da_t = {1'b0, src_1};
        if (src_1[3:0] > 4'd9 || src_ac) da_t = da_t + 9'h006;
        if (da_t[8] || src_cy || da_t[7:4] > 4'd9) da_t = da_t + 9'h060;
        result_1  = da_t[7:0];
        result_cy = src_cy | da_t[8];
      end
      ALU_CPL:  result_1 = ~src_1;
      ALU_CLR:  result_1 = 8'h00;
      ALU_XCHD: begin
        result_1 = {src_1[7:4], src_2[3:0]};
        result_2 = {src_2[7:4], src_1[3:0]};
      end
      ALU_ADD16: begin
        wide     = {src_3, src_2} + {8'd0, src_1};
        result_1 = wide[7:0];
        result_2 = wide[15:8];
      end
      ALU_REL16: begin
        wide     = {src_3, src_2} + {{8{src_1[7]}}, src_1};
        result_1 = wide[7:0];
        result_2 = wide[15:8];
      end
      default: ; // ALU_PASS
    endcase
  end

endmodule
