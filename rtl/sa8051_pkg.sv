// Shared types and constants of the SA8051 microcontroller.
//
// The ALU operation code is 5 bits wide, as the ALU port table of the design
// gives it; the list of operations and their encoding is this design's own
// choice. The SFR addresses are those of the standard 8051 instruction set,
// which the processor implements.
package sa8051_pkg;

  // ALU operation codes (alu_op, 5 bits).
  typedef enum logic [4:0] {
    ALU_ADD   = 5'd0,   // result_1 = src_1 + src_2
    ALU_ADDC  = 5'd1,   // result_1 = src_1 + src_2 + CY
    ALU_SUBB  = 5'd2,   // result_1 = src_1 - src_2 - CY
    ALU_INC   = 5'd3,   // result_1 = src_1 + 1 (no flags)
    ALU_DEC   = 5'd4,   // result_1 = src_1 - 1 (no flags)
    ALU_ANL   = 5'd5,   // result_1 = src_1 & src_2
    ALU_ORL   = 5'd6,   // result_1 = src_1 | src_2
    ALU_XRL   = 5'd7,   // result_1 = src_1 ^ src_2
    ALU_RL    = 5'd8,   // rotate src_1 left
    ALU_RLC   = 5'd9,   // rotate src_1 left through CY
    ALU_RR    = 5'd10,  // rotate src_1 right
    ALU_RRC   = 5'd11,  // rotate src_1 right through CY
    ALU_SWAP  = 5'd12,  // swap nibbles of src_1
    ALU_DA    = 5'd13,  // decimal adjust src_1
    ALU_CPL   = 5'd14,  // result_1 = ~src_1
    ALU_CLR   = 5'd15,  // result_1 = 0
    ALU_XCHD  = 5'd16,  // result_1 = {src_1[7:4],src_2[3:0]}, result_2 = {src_2[7:4],src_1[3:0]}
    ALU_CMP   = 5'd17,  // CY = src_1 < src_2, result_1 = src_1 - src_2 (CJNE)
    ALU_ADD16 = 5'd18,  // {result_2,result_1} = {src_3,src_2} + src_1 (MOVC, JMP @A+DPTR)
    ALU_REL16 = 5'd19,  // {result_2,result_1} = {src_3,src_2} + sign-extended src_1 (branches)
    ALU_PASS  = 5'd20   // result_1 = src_1, result_2 = src_2
  } alu_op_e;

  // Direct addresses of the special function registers held in the CPU.
  localparam logic [7:0] SFR_P0  = 8'h80;
  localparam logic [7:0] SFR_SP  = 8'h81;
  localparam logic [7:0] SFR_DPL = 8'h82;
  localparam logic [7:0] SFR_DPH = 8'h83;
  localparam logic [7:0] SFR_P1  = 8'h90;
  localparam logic [7:0] SFR_P2  = 8'hA0;
  localparam logic [7:0] SFR_P3  = 8'hB0;
  localparam logic [7:0] SFR_PSW = 8'hD0;
  localparam logic [7:0] SFR_ACC = 8'hE0;
  localparam logic [7:0] SFR_B   = 8'hF0;

  // PSW bit positions (standard 8051 layout).
  localparam int PSW_CY = 7;
  localparam int PSW_AC = 6;
  localparam int PSW_OV = 2;

  // Reset value of the stack pointer.
  localparam logic [7:0] SP_RESET = 8'h07;

endpackage
