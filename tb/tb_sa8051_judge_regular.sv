// Self-checking testbench for sa8051_judge_regular: all 256 opcodes
// against an explicit list of the irregular opcodes in the regular rows
// (low nibble 4..F) of the 8051 opcode map.
module tb_sa8051_judge_regular;
  logic [7:0] ir;
  logic regular;
  int checks = 0, failures = 0, nreg = 0;
  sa8051_judge_regular dut (.ir(ir), .regular(regular));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 256; i++) begin
      ir = 8'(i);
      #1;
      // Irregular: rows 0..3, and these single opcodes
      exp = (ir[3:0] >= 4) &&
            !(ir inside {8'h04, 8'h14, 8'h74, 8'h84, 8'hA4, 8'hB4, 8'hC4, 8'hD4, 8'hE4, 8'hF4,
                         8'hA5, 8'hB5, 8'hD6, 8'hD7});
      checks++;
      if (regular !== exp) begin
        failures++;
        $display("FAIL opcode %h: regular=%b expected %b", ir, regular, exp);
      end
      if (regular) nreg++;
    end
    // 12 rows x 16 columns minus 14 irregular entries
    checks++;
    if (nreg != 12 * 16 - 14) begin failures++; $display("FAIL regular count %0d", nreg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
