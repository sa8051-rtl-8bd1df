// Self-checking testbench for sa8051_bit_addr: every bit address maps to
// the byte that holds it (RAM 20H..2FH or a bit-addressable SFR) and to the
// right bit index.
module tb_sa8051_bit_addr;
  logic [7:0] ba, rar;
  logic [2:0] idx;
  int checks = 0, failures = 0;
  sa8051_bit_addr dut (.bit_addr(ba), .rar(rar), .bit_index(idx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_byte;
    for (int i = 0; i < 256; i++) begin
      ba = 8'(i);
      #1;
      exp_byte = (i < 128) ? 32 + i / 8 : (i / 8) * 8;
      checks++;
      if (rar !== 8'(exp_byte) || idx !== 3'(i % 8)) begin
        failures++;
        $display("FAIL bit %h: byte %h idx %0d expected %h %0d", ba, rar, idx, exp_byte, i % 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
