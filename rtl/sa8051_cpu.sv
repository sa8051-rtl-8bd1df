// SA8051 processor core: an 8051-instruction-set CPU that talks to its
// program and data memories only through four-phase request/acknowledge
// handshakes.
//
// How it works. The core runs the loop "fetch the opcode, increment PC,
// execute". An instruction is executed as a short sequence of steps; each
// step either does register work in one clock or starts a memory handshake
// and waits for it. Every memory access is a full four-phase cycle: the core
// raises the request, waits for the acknowledge, takes the data and drops
// the request, then waits for the acknowledge to fall. Only the accesses an
// instruction really needs are made, so a one-byte register instruction costs
// one ROM access while a three-byte instruction costs three, and SFRs held in
// the core (ACC, B, PSW, SP, DPL, DPH, P0..P3) are read and written without
// any memory handshake.
//
// Datapath registers follow the processor's block diagram: PC and the
// program address register PAR (loaded from PC, or from the ALU for MOVC,
// through a multiplexer); the instruction register IR; operand registers
// T1, T2, T3 that feed the three ALU inputs; the RAM address register RAR;
// plus ACC, B, PSW, SP and DPTR. Operand bytes fetched from ROM go straight
// into the register that uses them (RAR, T1, T2 or a branch offset), and
// moves such as MOV never pass through the ALU.
//
// Decoding follows the design: an opcode is first classified as regular or
// irregular (sa8051_judge_regular). Regular opcodes (the INC/DEC/ADD/ADDC/
// ORL/ANL/XRL/MOV/SUBB/CJNE/XCH/DJNZ columns applied to #data, direct, @Ri
// or Rn) run one generic sequence: form the operand address from the low
// nibble, read the operand, execute, write the result. Irregular opcodes each
// have their own sequence; a de-multiplexer cell (balsa_demux) steers the
// execute activation to one or the other. Bit instructions fetch the byte that holds the
// bit into T1 (address from sa8051_bit_addr), test or modify the bit selected
// by the bit index, and write the byte back where needed.
//
// Interface. rom_addr/rom_addr_req/rom_data_req/rom_ack/rom_data form the
// ROM fetch (both requests rise and fall together). ram_addr/ram_wdata/
// ram_rnw with ram_rd_req (read) or ram_wr_req (write), ram_ack and
// ram_rdata form the RAM access. p*_in are the input ports, read at the SFR
// addresses of P0..P3; p*_out are the output port latches, written at those
// addresses. activate low holds the core idle between instructions. reset
// (asynchronous, active high) clears the SFRs and PC. insn_done pulses for
// one clock at the end of each instruction.
//
// Timing. The core is written as a single-clock state machine: the
// self-timed sequencing of the original asynchronous implementation is
// replaced by one step per clock, with memory waits governed by the
// handshakes. Reset values, the step schedule and the SFR set are this
// design's choices. MUL AB, DIV AB and MOVX execute as one-byte no-ops, as in
// the processor this follows; there are no interrupts, timers or UART, and
// RETI behaves as RET. Port reads return the input pins, also for
// read-modify-write instructions.
module sa8051_cpu
  import sa8051_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        activate,
  // ROM fetch channels
  output logic [15:0] rom_addr,
  output logic        rom_addr_req,
  output logic        rom_data_req,
  input  logic        rom_ack,
  input  logic [7:0]  rom_data,
  // RAM channels
  output logic [7:0]  ram_addr,
  output logic [7:0]  ram_wdata,
  output logic        ram_rnw,
  output logic        ram_rd_req,
  output logic        ram_wr_req,
  input  logic        ram_ack,
  input  logic [7:0]  ram_rdata,
  // Ports
  input  logic [7:0]  p0_in,
  input  logic [7:0]  p1_in,
  input  logic [7:0]  p2_in,
  input  logic [7:0]  p3_in,
  output logic [7:0]  p0_out,
  output logic [7:0]  p1_out,
  output logic [7:0]  p2_out,
  output logic [7:0]  p3_out,
  output logic        insn_done
);

  typedef enum logic [1:0] {S_FETCH, S_EXEC, S_ROM, S_RAM} state_e;

  // Destination of a byte read from ROM, RAM or an SFR.
  typedef enum logic [3:0] {
    TG_IR, TG_OP1, TG_OP2, TG_T1, TG_T2, TG_RAR, TG_ACC, TG_PCH, TG_PCL
  } tgt_e;

  localparam logic [3:0] STEP_BRANCH = 4'd15;

  state_e     state;
  logic [3:0] step;
  tgt_e       m_tgt;
  logic       m_inc;

  logic [15:0] pc, par, dptr;
  logic [7:0]  ir, op1, op2, t1, t2, t3, rar;
  logic [7:0]  acc, b, psw, sp;
  logic [2:0]  bidx;
  logic        rom_req;
  alu_op_e     alu_op;

  // ALU
  logic [7:0] r1, r2;
  logic       r_cy, r_ac, r_ov;

  sa8051_alu u_alu (
    .alu_op    (alu_op),
    .src_1     (t1),
    .src_2     (t2),
    .src_3     (t3),
    .src_cy    (psw[PSW_CY]),
    .src_ac    (psw[PSW_AC]),
    .result_1  (r1),
    .result_2  (r2),
    .result_cy (r_cy),
    .result_ac (r_ac),
    .result_ov (r_ov)
  );

  // Decoder classification
  logic regular;
  sa8051_judge_regular u_judge (.ir(ir), .regular(regular));

  // Bit address of the operand byte just fetched into OP1
  logic [7:0] bit_rar;
  logic [2:0] bit_index;
  sa8051_bit_addr u_bit (.bit_addr(op1), .rar(bit_rar), .bit_index(bit_index));

  // Execute activation, steered to the regular or irregular sequences
  logic go_regular, go_irregular;
  balsa_demux u_exec_demux (
    .d   ((state == S_EXEC) && (step != STEP_BRANCH)),
    .sel (regular),
    .q0  (go_irregular),
    .q1  (go_regular)
  );

  // PAR source: PC, or the 16-bit ALU result for MOVC
  logic        par_from_alu;
  logic [15:0] par_d;
  assign par_from_alu = (state == S_EXEC) && (ir == 8'h83 || ir == 8'h93);
  balsa_mux #(.WIDTH(16)) u_par_mux (
    .d0  (pc),
    .d1  ({r2, r1}),
    .sel (par_from_alu),
    .q   (par_d)
  );

  logic [3:0] h_ir, l_ir;
  logic [7:0] rn_addr, ri_addr;
  logic [7:0] psw_rd;
  logic       bit_val;
  logic [7:0] bit_mask;
  assign h_ir     = ir[7:4];
  assign l_ir     = ir[3:0];
  assign rn_addr  = {3'b000, psw[4:3], ir[2:0]};
  assign ri_addr  = {3'b000, psw[4:3], 2'b00, ir[0]};
  assign psw_rd   = {psw[7:1], ^acc};          // P flag is the parity of ACC
  assign bit_val  = t1[bidx];
  assign bit_mask = 8'h01 << bidx;

  logic [7:0] pout [4];

  assign rom_addr     = par;
  assign rom_addr_req = rom_req;
  assign rom_data_req = rom_req;
  assign p0_out = pout[0];
  assign p1_out = pout[1];
  assign p2_out = pout[2];
  assign p3_out = pout[3];

  function automatic logic is_sfr(input logic [7:0] a);
    return a inside {SFR_P0, SFR_SP, SFR_DPL, SFR_DPH, SFR_P1, SFR_P2, SFR_P3,
                     SFR_PSW, SFR_ACC, SFR_B};
  endfunction

  function automatic logic [7:0] sfr_val(input logic [7:0] a);
    unique case (a)
      SFR_P0:  return p0_in;
      SFR_P1:  return p1_in;
      SFR_P2:  return p2_in;
      SFR_P3:  return p3_in;
      SFR_SP:  return sp;
      SFR_DPL: return dptr[7:0];
      SFR_DPH: return dptr[15:8];
      SFR_PSW: return psw_rd;
      SFR_ACC: return acc;
      SFR_B:   return b;
      default: return 8'h00;
    endcase
  endfunction

  // Is this opcode a bit-addressed instruction (bit address in byte 2)?
  function automatic logic is_bit_op(input logic [7:0] op);
    return op inside {8'h10, 8'h20, 8'h30, 8'h72, 8'h82, 8'h92, 8'hA0, 8'hA2,
                      8'hB0, 8'hB2, 8'hC2, 8'hD2};
  endfunction

  // ALU operation of a regular column / irregular accumulator opcode
  function automatic alu_op_e col_op(input logic [3:0] h);
    unique case (h)
      4'h0: return ALU_INC;
      4'h1: return ALU_DEC;
      4'h2: return ALU_ADD;
      4'h3: return ALU_ADDC;
      4'h4: return ALU_ORL;
      4'h5: return ALU_ANL;
      4'h6: return ALU_XRL;
      4'h9: return ALU_SUBB;
      default: return ALU_PASS;
    endcase
  endfunction

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state     <= S_FETCH;
      step      <= '0;
      m_tgt     <= TG_IR;
      m_inc     <= 1'b0;
      pc        <= '0;
      par       <= '0;
      dptr      <= '0;
      ir        <= '0;
      op1       <= '0;
      op2       <= '0;
      t1        <= '0;
      t2        <= '0;
      t3        <= '0;
      rar       <= '0;
      acc       <= '0;
      b         <= '0;
      psw       <= '0;
      sp        <= SP_RESET;
      bidx      <= '0;
      alu_op    <= ALU_PASS;
      rom_req   <= 1'b0;
      ram_addr  <= '0;
      ram_wdata <= '0;
      ram_rnw   <= 1'b1;
      ram_rd_req <= 1'b0;
      ram_wr_req <= 1'b0;
      insn_done <= 1'b0;
      for (int i = 0; i < 4; i++) pout[i] <= 8'hFF;
    end else begin
      insn_done <= 1'b0;
      unique case (state)
        // ---------------------------------------------------------------
        S_FETCH: begin
          if (activate) begin
            rom_rd(TG_IR, 1'b1);
            step <= '0;
          end
        end
        // ---------------------------------------------------------------
        S_ROM: begin
          if (rom_req && rom_ack) begin
            put(m_tgt, rom_data);
            if (m_inc) pc <= pc + 16'd1;
            rom_req <= 1'b0;
          end else if (!rom_req && !rom_ack) begin
            state <= S_EXEC;
          end
        end
        // ---------------------------------------------------------------
        S_RAM: begin
          if ((ram_rd_req || ram_wr_req) && ram_ack) begin
            if (ram_rd_req) put(m_tgt, ram_rdata);
            ram_rd_req <= 1'b0;
            ram_wr_req <= 1'b0;
          end else if (!ram_rd_req && !ram_wr_req && !ram_ack) begin
            state <= S_EXEC;
          end
        end
        // ---------------------------------------------------------------
        S_EXEC: begin
          if (step == STEP_BRANCH) begin
            // Common end of every taken relative branch: PC := PC + rel
            pc <= {r2, r1};
            done();
          end else if (go_regular) begin
            exec_regular();
          end else if (go_irregular) begin
            exec_irregular();
          end
        end
        default: state <= S_FETCH;
      endcase
    end
  end

  // ---------------------------------------------------------------------
  // Step helpers
  // ---------------------------------------------------------------------
  task automatic put(input tgt_e t, input logic [7:0] v);
    unique case (t)
      TG_IR:  ir  <= v;
      TG_OP1: op1 <= v;
      TG_OP2: op2 <= v;
      TG_T1:  t1  <= v;
      TG_T2:  t2  <= v;
      TG_RAR: rar <= v;
      TG_ACC: acc <= v;
      TG_PCH: pc[15:8] <= v;
      TG_PCL: pc[7:0]  <= v;
      default: ;
    endcase
  endtask

  task automatic next();
    step <= step + 4'd1;
  endtask

  task automatic done();
    state     <= S_FETCH;
    step      <= '0;
    insn_done <= 1'b1;
  endtask

  // Read ROM at PAR (loaded from the PAR multiplexer) into t.
  task automatic rom_rd(input tgt_e t, input logic inc);
    par     <= par_d;
    rom_req <= 1'b1;
    m_tgt   <= t;
    m_inc   <= inc;
    state   <= S_ROM;
    step    <= step + 4'd1;
  endtask

  task automatic ram_rd(input logic [7:0] a, input tgt_e t);
    ram_addr   <= a;
    ram_rnw    <= 1'b1;
    ram_rd_req <= 1'b1;
    m_tgt      <= t;
    state      <= S_RAM;
    step       <= step + 4'd1;
  endtask

  task automatic ram_wr(input logic [7:0] a, input logic [7:0] d);
    ram_addr   <= a;
    ram_wdata  <= d;
    ram_rnw    <= 1'b0;
    ram_wr_req <= 1'b1;
    state      <= S_RAM;
    step       <= step + 4'd1;
  endtask

  task automatic sfr_wr(input logic [7:0] a, input logic [7:0] d);
    unique case (a)
      SFR_P0:  pout[0]    <= d;
      SFR_P1:  pout[1]    <= d;
      SFR_P2:  pout[2]    <= d;
      SFR_P3:  pout[3]    <= d;
      SFR_SP:  sp         <= d;
      SFR_DPL: dptr[7:0]  <= d;
      SFR_DPH: dptr[15:8] <= d;
      SFR_PSW: psw        <= d;
      SFR_ACC: acc        <= d;
      SFR_B:   b          <= d;
      default: ;
    endcase
  endtask

  // Direct-address read/write: core SFRs bypass the memory handshake.
  task automatic dir_rd(input logic [7:0] a, input tgt_e t);
    if (is_sfr(a)) begin
      put(t, sfr_val(a));
      next();
    end else begin
      ram_rd(a, t);
    end
  endtask

  task automatic dir_wr(input logic [7:0] a, input logic [7:0] d);
    if (is_sfr(a)) begin
      sfr_wr(a, d);
      next();
    end else begin
      ram_wr(a, d);
    end
  endtask

  // Operand "x" of the regular part, selected by the low opcode nibble:
  // 4 = #data, 5 = direct, 6/7 = @Ri, 8..F = Rn. The address is in RAR.
  task automatic x_addr();
    if (l_ir == 4'd4) next();
    else if (l_ir == 4'd5) rom_rd(TG_RAR, 1'b1);
    else if (l_ir[3:1] == 3'b011) ram_rd(ri_addr, TG_RAR);
    else begin
      rar <= rn_addr;
      next();
    end
  endtask

  task automatic x_rd(input tgt_e t);
    if (l_ir == 4'd4) rom_rd(t, 1'b1);
    else if (l_ir == 4'd5) dir_rd(rar, t);
    else ram_rd(rar, t);
  endtask

  task automatic x_wr(input logic [7:0] d);
    if (l_ir == 4'd5) dir_wr(rar, d);
    else ram_wr(rar, d);
  endtask

  // Set up PC := PC + rel in the ALU; finished in STEP_BRANCH.
  task automatic branch(input logic [7:0] rel);
    t1     <= rel;
    t2     <= pc[7:0];
    t3     <= pc[15:8];
    alu_op <= ALU_REL16;
    step   <= STEP_BRANCH;
  endtask

  task automatic set_arith_flags();
    psw[PSW_CY] <= r_cy;
    psw[PSW_AC] <= r_ac;
    psw[PSW_OV] <= r_ov;
  endtask

  // ---------------------------------------------------------------------
  // Regular part: read operands, execute, write results
  // ---------------------------------------------------------------------
  task automatic exec_regular();
    if (step == 4'd0) begin
      x_addr();
    end else begin
      unique case (h_ir)
        4'h0, 4'h1: begin                          // INC x / DEC x
          unique case (step)
            4'd1: begin alu_op <= col_op(h_ir); x_rd(TG_T1); end
            4'd2: x_wr(r1);
            default: done();
          endcase
        end
        4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h9: begin  // ADD/ADDC/ORL/ANL/XRL/SUBB A,x
          unique case (step)
            4'd1: begin t1 <= acc; alu_op <= col_op(h_ir); x_rd(TG_T2); end
            default: begin
              acc <= r1;
              if (h_ir inside {4'h2, 4'h3, 4'h9}) set_arith_flags();
              done();
            end
          endcase
        end
        4'h7: begin                                // MOV x,#data
          unique case (step)
            4'd1: rom_rd(TG_T2, 1'b1);
            4'd2: x_wr(t2);
            default: done();
          endcase
        end
        4'h8: begin                                // MOV dir,x
          unique case (step)
            4'd1: x_rd(TG_T2);
            4'd2: rom_rd(TG_T1, 1'b1);
            4'd3: dir_wr(t1, t2);
            default: done();
          endcase
        end
        4'hA: begin                                // MOV x,dir
          unique case (step)
            4'd1: rom_rd(TG_T1, 1'b1);
            4'd2: dir_rd(t1, TG_T2);
            4'd3: x_wr(t2);
            default: done();
          endcase
        end
        4'hB: begin                                // CJNE x,#data,rel
          unique case (step)
            4'd1: x_rd(TG_T1);
            4'd2: rom_rd(TG_T2, 1'b1);
            4'd3: begin alu_op <= ALU_CMP; rom_rd(TG_OP2, 1'b1); end
            default: begin
              psw[PSW_CY] <= r_cy;
              if (r1 != 8'h00) branch(op2);
              else done();
            end
          endcase
        end
        4'hC: begin                                // XCH A,x
          unique case (step)
            4'd1: x_rd(TG_T2);
            4'd2: x_wr(acc);
            default: begin acc <= t2; done(); end
          endcase
        end
        4'hD: begin                                // DJNZ x,rel
          unique case (step)
            4'd1: begin alu_op <= ALU_DEC; x_rd(TG_T1); end
            4'd2: x_wr(r1);
            4'd3: rom_rd(TG_OP2, 1'b1);
            default: begin
              if (r1 != 8'h00) branch(op2);
              else done();
            end
          endcase
        end
        4'hE: begin                                // MOV A,x
          unique case (step)
            4'd1: x_rd(TG_ACC);
            default: done();
          endcase
        end
        default: begin                             // MOV x,A
          unique case (step)
            4'd1: x_wr(acc);
            default: done();
          endcase
        end
      endcase
    end
  endtask

  // ---------------------------------------------------------------------
  // Irregular part
  // ---------------------------------------------------------------------
  task automatic exec_irregular();
    if (is_bit_op(ir)) begin
      exec_bit();
    end else if (l_ir == 4'h1) begin               // AJMP / ACALL addr11
      unique case (step)
        4'd0: rom_rd(TG_OP1, 1'b1);
        4'd1: begin
          if (ir[4]) begin ram_wr(sp + 8'd1, pc[7:0]); sp <= sp + 8'd1; end
          else begin pc <= {pc[15:11], ir[7:5], op1}; done(); end
        end
        4'd2: begin ram_wr(sp + 8'd1, pc[15:8]); sp <= sp + 8'd1; end
        default: begin pc <= {pc[15:11], ir[7:5], op1}; done(); end
      endcase
    end else begin
      unique case (ir)
        8'h02, 8'h12: begin                         // LJMP / LCALL addr16
          unique case (step)
            4'd0: rom_rd(TG_OP1, 1'b1);
            4'd1: rom_rd(TG_OP2, 1'b1);
            4'd2: begin
              if (ir[4]) begin ram_wr(sp + 8'd1, pc[7:0]); sp <= sp + 8'd1; end
              else begin pc <= {op1, op2}; done(); end
            end
            4'd3: begin ram_wr(sp + 8'd1, pc[15:8]); sp <= sp + 8'd1; end
            default: begin pc <= {op1, op2}; done(); end
          endcase
        end
        8'h22, 8'h32: begin                         // RET / RETI
          unique case (step)
            4'd0: begin ram_rd(sp, TG_PCH); sp <= sp - 8'd1; end
            4'd1: begin ram_rd(sp, TG_PCL); sp <= sp - 8'd1; end
            default: done();
          endcase
        end
        8'h42, 8'h52, 8'h62: begin                  // ORL/ANL/XRL dir,A
          unique case (step)
            4'd0: rom_rd(TG_RAR, 1'b1);
            4'd1: begin t2 <= acc; alu_op <= col_op(h_ir); dir_rd(rar, TG_T1); end
            4'd2: dir_wr(rar, r1);
            default: done();
          endcase
        end
        8'h43, 8'h53, 8'h63: begin                  // ORL/ANL/XRL dir,#data
          unique case (step)
            4'd0: rom_rd(TG_RAR, 1'b1);
            4'd1: rom_rd(TG_T2, 1'b1);
            4'd2: begin alu_op <= col_op(h_ir); dir_rd(rar, TG_T1); end
            4'd3: dir_wr(rar, r1);
            default: done();
          endcase
        end
        8'h40, 8'h50, 8'h60, 8'h70, 8'h80: begin    // JC/JNC/JZ/JNZ/SJMP rel
          unique case (step)
            4'd0: rom_rd(TG_OP2, 1'b1);
            default: begin
              if ((ir == 8'h40 &&  psw[PSW_CY]) || (ir == 8'h50 && !psw[PSW_CY]) ||
                  (ir == 8'h60 && acc == 8'h00) || (ir == 8'h70 && acc != 8'h00) ||
                  (ir == 8'h80))
                branch(op2);
              else done();
            end
          endcase
        end
        8'h03, 8'h13, 8'h23, 8'h33, 8'h04, 8'h14,
        8'hC4, 8'hD4, 8'hE4, 8'hF4: begin           // accumulator operations
          unique case (step)
            4'd0: begin
              t1 <= acc;
              unique case (ir)
                8'h03: alu_op <= ALU_RR;
                8'h13: alu_op <= ALU_RRC;
                8'h23: alu_op <= ALU_RL;
                8'h33: alu_op <= ALU_RLC;
                8'h04: alu_op <= ALU_INC;
                8'h14: alu_op <= ALU_DEC;
                8'hC4: alu_op <= ALU_SWAP;
                8'hD4: alu_op <= ALU_DA;
                8'hE4: alu_op <= ALU_CLR;
                default: alu_op <= ALU_CPL;
              endcase
              next();
            end
            default: begin
              acc <= r1;
              if (ir inside {8'h13, 8'h33, 8'hD4}) psw[PSW_CY] <= r_cy;
              done();
            end
          endcase
        end
        8'h73, 8'h83, 8'h93: begin                  // JMP @A+DPTR, MOVC A,@A+PC/DPTR
          unique case (step)
            4'd0: begin
              t1     <= acc;
              t2     <= (ir == 8'h83) ? pc[7:0]  : dptr[7:0];
              t3     <= (ir == 8'h83) ? pc[15:8] : dptr[15:8];
              alu_op <= ALU_ADD16;
              next();
            end
            4'd1: begin
              if (ir == 8'h73) begin pc <= {r2, r1}; done(); end
              else rom_rd(TG_ACC, 1'b0);
            end
            default: done();
          endcase
        end
        8'hA3: begin dptr <= dptr + 16'd1; done(); end   // INC DPTR
        8'h74: begin                                // MOV A,#data
          unique case (step)
            4'd0: rom_rd(TG_ACC, 1'b1);
            default: done();
          endcase
        end
        8'hB4: begin                                // CJNE A,#data,rel
          unique case (step)
            4'd0: begin t1 <= acc; rom_rd(TG_T2, 1'b1); end
            4'd1: begin alu_op <= ALU_CMP; rom_rd(TG_OP2, 1'b1); end
            default: begin
              psw[PSW_CY] <= r_cy;
              if (r1 != 8'h00) branch(op2);
              else done();
            end
          endcase
        end
        8'hB5: begin                                // CJNE A,dir,rel
          unique case (step)
            4'd0: rom_rd(TG_RAR, 1'b1);
            4'd1: begin t1 <= acc; dir_rd(rar, TG_T2); end
            4'd2: begin alu_op <= ALU_CMP; rom_rd(TG_OP2, 1'b1); end
            default: begin
              psw[PSW_CY] <= r_cy;
              if (r1 != 8'h00) branch(op2);
              else done();
            end
          endcase
        end
        8'hD6, 8'hD7: begin                         // XCHD A,@Ri
          unique case (step)
            4'd0: x_addr();
            4'd1: begin t1 <= acc; alu_op <= ALU_XCHD; ram_rd(rar, TG_T2); end
            4'd2: ram_wr(rar, r2);
            default: begin acc <= r1; done(); end
          endcase
        end
        8'h90: begin                                // MOV DPTR,#data16
          unique case (step)
            4'd0: rom_rd(TG_OP1, 1'b1);
            4'd1: rom_rd(TG_OP2, 1'b1);
            default: begin dptr <= {op1, op2}; done(); end
          endcase
        end
        8'hC0: begin                                // PUSH dir
          unique case (step)
            4'd0: rom_rd(TG_RAR, 1'b1);
            4'd1: dir_rd(rar, TG_T2);
            4'd2: begin ram_wr(sp + 8'd1, t2); sp <= sp + 8'd1; end
            default: done();
          endcase
        end
        8'hD0: begin                                // POP dir
          unique case (step)
            4'd0: rom_rd(TG_RAR, 1'b1);
            4'd1: begin ram_rd(sp, TG_T2); sp <= sp - 8'd1; end
            4'd2: dir_wr(rar, t2);
            default: done();
          endcase
        end
        8'hB3: begin psw[PSW_CY] <= !psw[PSW_CY]; done(); end  // CPL C
        8'hC3: begin psw[PSW_CY] <= 1'b0; done(); end          // CLR C
        8'hD3: begin psw[PSW_CY] <= 1'b1; done(); end          // SETB C
        default: done();   // NOP, MUL, DIV, MOVX, undefined A5
      endcase
    end
  endtask

  // ---------------------------------------------------------------------
  // Bit-addressed instructions: fetch bit address, read the byte into T1,
  // then test or modify bit T1[bidx].
  // ---------------------------------------------------------------------
  task automatic exec_bit();
    unique case (step)
      4'd0: rom_rd(TG_OP1, 1'b1);
      4'd1: begin rar <= bit_rar; bidx <= bit_index; next(); end
      4'd2: dir_rd(rar, TG_T1);
      4'd3: begin
        unique case (ir)
          8'h72: begin psw[PSW_CY] <= psw[PSW_CY] |  bit_val; done(); end  // ORL C,bit
          8'hA0: begin psw[PSW_CY] <= psw[PSW_CY] | !bit_val; done(); end  // ORL C,/bit
          8'h82: begin psw[PSW_CY] <= psw[PSW_CY] &  bit_val; done(); end  // ANL C,bit
          8'hB0: begin psw[PSW_CY] <= psw[PSW_CY] & !bit_val; done(); end  // ANL C,/bit
          8'hA2: begin psw[PSW_CY] <= bit_val; done(); end                 // MOV C,bit
          8'h92: dir_wr(rar, psw[PSW_CY] ? (t1 | bit_mask) : (t1 & ~bit_mask)); // MOV bit,C
          8'hB2: dir_wr(rar, t1 ^ bit_mask);                                // CPL bit
          8'hC2: dir_wr(rar, t1 & ~bit_mask);                               // CLR bit
          8'hD2: dir_wr(rar, t1 | bit_mask);                                // SETB bit
          default: rom_rd(TG_OP2, 1'b1);                                    // JBC/JB/JNB: rel
        endcase
      end
      4'd4: begin
        if (ir inside {8'h92, 8'hB2, 8'hC2, 8'hD2}) done();
        else if (ir == 8'h10) begin                                         // JBC
          if (bit_val) dir_wr(rar, t1 & ~bit_mask);
          else done();
        end
        else if ((ir == 8'h20 && bit_val) || (ir == 8'h30 && !bit_val)) branch(op2);
        else done();
      end
      default: branch(op2);                                                 // JBC taken
    endcase
  endtask

endmodule
