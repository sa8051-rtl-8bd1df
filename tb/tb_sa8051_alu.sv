// Self-checking testbench for sa8051_alu: random operands for every
// operation, compared with a reference written from the 8051 instruction
// set definitions (full-width arithmetic, not the split adder of the ALU).
module tb_sa8051_alu;
  import sa8051_pkg::*;
  alu_op_e    op;
  logic [7:0] s1, s2, s3, r1, r2;
  logic       cy, ac, rcy, rac, rov;
  int checks = 0, failures = 0;

  sa8051_alu dut (.alu_op(op), .src_1(s1), .src_2(s2), .src_3(s3), .src_cy(cy), .src_ac(ac),
                  .result_1(r1), .result_2(r2), .result_cy(rcy), .result_ac(rac), .result_ov(rov));

  task automatic expect_eq(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%0d s1=%h s2=%h s3=%h cy=%b ac=%b: got %h exp %h", what, op, s1, s2, s3, cy, ac, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, bb, c, res, sres;
    logic [15:0] w;
    logic [7:0] e;
    logic ecy, eac;
    for (int n = 0; n < 4000; n++) begin
      op = alu_op_e'(n % 21);
      s1 = 8'($urandom); s2 = 8'($urandom); s3 = 8'($urandom);
      cy = 1'($urandom); ac = 1'($urandom);
      if (n < 8) begin s1 = 8'h7F; s2 = 8'h01; end   // overflow corner
      #1;
      a = int'(s1); bb = int'(s2); c = int'(cy);
      case (op)
        ALU_ADD, ALU_ADDC: begin
          if (op == ALU_ADD) c = 0;
          res = a + bb + c;
          sres = int'($signed(s1)) + int'($signed(s2)) + c;
          expect_eq("add r1", 16'(r1), 16'(res & 255));
          expect_eq("add cy", 16'(rcy), 16'(res > 255));
          expect_eq("add ac", 16'(rac), 16'(((a & 15) + (bb & 15) + c) > 15));
          expect_eq("add ov", 16'(rov), 16'(sres > 127 || sres < -128));
        end
        ALU_SUBB: begin
          res = a - bb - c;
          sres = int'($signed(s1)) - int'($signed(s2)) - c;
          expect_eq("subb r1", 16'(r1), 16'(res & 255));
          expect_eq("subb cy", 16'(rcy), 16'(res < 0));
          expect_eq("subb ac", 16'(rac), 16'(((a & 15) - (bb & 15) - c) < 0));
          expect_eq("subb ov", 16'(rov), 16'(sres > 127 || sres < -128));
        end
        ALU_CMP: begin
          expect_eq("cmp cy", 16'(rcy), 16'(a < bb));
          expect_eq("cmp eq", 16'(r1 == 0), 16'(a == bb));
        end
        ALU_INC:  expect_eq("inc", 16'(r1), 16'((a + 1) & 255));
        ALU_DEC:  expect_eq("dec", 16'(r1), 16'((a + 255) & 255));
        ALU_ANL:  expect_eq("anl", 16'(r1), 16'(a & bb));
        ALU_ORL:  expect_eq("orl", 16'(r1), 16'(a | bb));
        ALU_XRL:  expect_eq("xrl", 16'(r1), 16'(a ^ bb));
        ALU_RL:   expect_eq("rl",  16'(r1), 16'(((a << 1) | (a >> 7)) & 255));
        ALU_RR:   expect_eq("rr",  16'(r1), 16'(((a >> 1) | (a << 7)) & 255));
        ALU_RLC: begin
          expect_eq("rlc", 16'(r1), 16'(((a << 1) | c) & 255));
          expect_eq("rlc cy", 16'(rcy), 16'(a >> 7));
        end
        ALU_RRC: begin
          expect_eq("rrc", 16'(r1), 16'((a >> 1) | (c << 7)));
          expect_eq("rrc cy", 16'(rcy), 16'(a & 1));
        end
        ALU_SWAP: expect_eq("swap", 16'(r1), 16'(((a & 15) << 4) | (a >> 4)));
        ALU_DA: begin
          // Intel definition, written as two decisions on the full value
          res = a;
          if ((res & 15) > 9 || ac) res = res + 6;
          ecy = cy || (res > 255);
          if (((res >> 4) & 15) > 9 || ecy || res > 255) begin res = res + 96; end
          if (res > 255) ecy = 1'b1;
          expect_eq("da", 16'(r1), 16'(res & 255));
          expect_eq("da cy", 16'(rcy), 16'(ecy));
        end
        ALU_CPL:  expect_eq("cpl", 16'(r1), 16'((~a) & 255));
        ALU_CLR:  expect_eq("clr", 16'(r1), 16'h0);
        ALU_XCHD: begin
          expect_eq("xchd r1", 16'(r1), 16'((a & 8'hF0) | (bb & 15)));
          expect_eq("xchd r2", 16'(r2), 16'((bb & 8'hF0) | (a & 15)));
        end
        ALU_ADD16: begin
          w = {s3, s2} + 16'(a);
          expect_eq("add16", {r2, r1}, w);
        end
        ALU_REL16: begin
          w = {s3, s2} + 16'($signed(s1));
          expect_eq("rel16", {r2, r1}, w);
        end
        default: begin
          expect_eq("pass1", 16'(r1), 16'(a));
          expect_eq("pass2", 16'(r2), 16'(bb));
        end
      endcase
      if (!(op inside {ALU_ADD, ALU_ADDC, ALU_SUBB, ALU_CMP, ALU_RLC, ALU_RRC, ALU_DA}))
        expect_eq("cy kept", 16'(rcy), 16'(cy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
