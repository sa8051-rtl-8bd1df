// Self-checking testbench for sa8051_cpu on its own.
//
// The testbench answers the core's four-phase ROM and RAM handshakes itself,
// with a random delay before each acknowledge, so the core is exercised
// against memories of varying speed. A directed program (hand-assembled
// below) covers the regular opcode columns on #data/direct/@Ri/Rn, the
// accumulator operations, bit instructions on RAM and SFR bits, relative,
// absolute and long jumps and calls, stack operations, MOVC, XCHD, DA,
// register banks and the port latches. Expected RAM and port contents were
// worked out by hand from the 8051 instruction definitions. The memory
// traffic of the first instructions is also checked: an instruction makes
// exactly the ROM and RAM accesses it needs, and core SFRs cost none.
module tb_sa8051_cpu;
  logic clk = 0, reset, activate;
  logic [15:0] rom_addr;
  logic rom_addr_req, rom_data_req, rom_ack;
  logic [7:0] rom_data, ram_addr, ram_wdata, ram_rdata;
  logic ram_rnw, ram_rd_req, ram_wr_req, ram_ack;
  logic [7:0] p0_out, p1_out, p2_out, p3_out;
  logic insn_done;
  int checks = 0, failures = 0;

  logic [7:0] rom [4096];
  logic [7:0] ram [256];

  sa8051_cpu dut (
    .clk(clk), .reset(reset), .activate(activate),
    .rom_addr(rom_addr), .rom_addr_req(rom_addr_req), .rom_data_req(rom_data_req),
    .rom_ack(rom_ack), .rom_data(rom_data),
    .ram_addr(ram_addr), .ram_wdata(ram_wdata), .ram_rnw(ram_rnw),
    .ram_rd_req(ram_rd_req), .ram_wr_req(ram_wr_req), .ram_ack(ram_ack), .ram_rdata(ram_rdata),
    .p0_in(8'h00), .p1_in(8'h00), .p2_in(8'h00), .p3_in(8'h00),
    .p0_out(p0_out), .p1_out(p1_out), .p2_out(p2_out), .p3_out(p3_out),
    .insn_done(insn_done));

  always #5 clk = !clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ROM responder: acknowledge after 0..3 clocks, release when requests drop
  int rom_count = 0, ram_rd_count = 0, ram_wr_count = 0;
  initial begin
    rom_ack = 0; rom_data = 0;
    forever begin
      @(posedge clk);
      if (rom_addr_req && rom_data_req && !rom_ack) begin
        repeat (int'($urandom % 4)) @(posedge clk);
        rom_data <= rom[rom_addr[11:0]];
        rom_ack <= 1;
        rom_count++;
        @(posedge clk);
        while (rom_addr_req || rom_data_req) @(posedge clk);
        rom_ack <= 0;
      end
    end
  end

  initial begin
    ram_ack = 0; ram_rdata = 0;
    forever begin
      @(posedge clk);
      if ((ram_rd_req || ram_wr_req) && !ram_ack) begin
        repeat (int'($urandom % 4)) @(posedge clk);
        if (ram_rnw) begin ram_rdata <= ram[ram_addr]; ram_rd_count++; end
        else begin ram[ram_addr] = ram_wdata; ram_wr_count++; end
        ram_ack <= 1;
        @(posedge clk);
        while (ram_rd_req || ram_wr_req) @(posedge clk);
        ram_ack <= 0;
      end
    end
  end

  // Accesses per instruction, for the first few instructions
  int insn_idx = 0, rom_at_start = 0, ram_at_start = 0;
  int exp_rom [6] = '{3, 2, 1, 2, 2, 3};   // MOV SP,#; MOV A,#; MOV R0,A; ADD A,#; MOV dir,A; MOV dir,#
  int exp_ram [6] = '{0, 0, 1, 0, 1, 1};
  always @(posedge clk) begin
    if (insn_done && !reset) begin
      if (insn_idx < 6) begin
        check($sformatf("ROM accesses of instruction %0d", insn_idx), rom_count - rom_at_start == exp_rom[insn_idx]);
        check($sformatf("RAM accesses of instruction %0d", insn_idx),
              (ram_rd_count + ram_wr_count) - ram_at_start == exp_ram[insn_idx]);
      end
      insn_idx++;
      rom_at_start = rom_count;
      ram_at_start = ram_rd_count + ram_wr_count;
    end
  end

  task automatic put(int addr, logic [7:0] bytes []);
    foreach (bytes[i]) rom[addr + i] = bytes[i];
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int halt_seen;
    for (int i = 0; i < 4096; i++) rom[i] = 8'h00;
    for (int i = 0; i < 256; i++) ram[i] = 8'h00;
    put(16'h0000, '{8'h75, 8'h81, 8'h30});        // MOV SP,#30h
    put(16'h0003, '{8'h74, 8'h5A});               // MOV A,#5Ah
    put(16'h0005, '{8'hF8});                      // MOV R0,A
    put(16'h0006, '{8'h24, 8'hA7});               // ADD A,#0A7h   A=01 CY=1
    put(16'h0008, '{8'hF5, 8'h40});               // MOV 40h,A
    put(16'h000A, '{8'h75, 8'h20, 8'h00});        // MOV 20h,#00h
    put(16'h000D, '{8'h92, 8'h03});               // MOV 20h.3,C
    put(16'h000F, '{8'h74, 8'h37});               // MOV A,#37h
    put(16'h0011, '{8'h94, 8'h48});               // SUBB A,#48h   A=EE CY=1
    put(16'h0013, '{8'hF5, 8'h41});               // MOV 41h,A
    put(16'h0015, '{8'h78, 8'h50});               // MOV R0,#50h
    put(16'h0017, '{8'h76, 8'h99});               // MOV @R0,#99h
    put(16'h0019, '{8'hE6});                      // MOV A,@R0
    put(16'h001A, '{8'h04});                      // INC A
    put(16'h001B, '{8'hC4});                      // SWAP A        A=A9
    put(16'h001C, '{8'hF5, 8'h42});               // MOV 42h,A
    put(16'h001E, '{8'h7A, 8'h03});               // MOV R2,#3
    put(16'h0020, '{8'h74, 8'h00});               // MOV A,#0
    put(16'h0022, '{8'h24, 8'h05});               // loop: ADD A,#5
    put(16'h0024, '{8'hDA, 8'hFC});               // DJNZ R2,loop
    put(16'h0026, '{8'hF5, 8'h43});               // MOV 43h,A     0F
    put(16'h0028, '{8'hC0, 8'h43});               // PUSH 43h
    put(16'h002A, '{8'hD0, 8'h44});               // POP 44h
    put(16'h002C, '{8'h12, 8'h00, 8'hF0});        // LCALL 00F0h
    put(16'h002F, '{8'hF5, 8'h45});               // MOV 45h,A     77
    put(16'h0031, '{8'h85, 8'h45, 8'h90});        // MOV P1,45h
    put(16'h0034, '{8'hB4, 8'h77, 8'h02});        // CJNE A,#77h,+2 (not taken)
    put(16'h0037, '{8'h90, 8'h01, 8'h00});        // MOV DPTR,#0100h
    put(16'h003A, '{8'h74, 8'h02});               // MOV A,#2
    put(16'h003C, '{8'h93});                      // MOVC A,@A+DPTR  33
    put(16'h003D, '{8'hF5, 8'h46});               // MOV 46h,A
    put(16'h003F, '{8'h01, 8'h50});               // AJMP 0050h
    put(16'h0050, '{8'hD2, 8'h08});               // SETB 21h.0
    put(16'h0052, '{8'hB2, 8'h0F});               // CPL 21h.7
    put(16'h0054, '{8'h20, 8'h0F, 8'h02});        // JB 21h.7,+2 (taken)
    put(16'h0057, '{8'h80, 8'hFE});               // trap
    put(16'h0059, '{8'h10, 8'h08, 8'h02});        // JBC 21h.0,+2 (taken, clears)
    put(16'h005C, '{8'h80, 8'hFE});               // trap
    put(16'h005E, '{8'h30, 8'h08, 8'h02});        // JNB 21h.0,+2 (taken)
    put(16'h0061, '{8'h80, 8'hFE});               // trap
    put(16'h0063, '{8'hE5, 8'h21});               // MOV A,21h     80
    put(16'h0065, '{8'hF5, 8'h47});               // MOV 47h,A
    put(16'h0067, '{8'h23});                      // RL A          01
    put(16'h0068, '{8'h64, 8'hFF});               // XRL A,#0FFh   FE
    put(16'h006A, '{8'h60, 8'h02});               // JZ +2 (not taken)
    put(16'h006C, '{8'h70, 8'h02});               // JNZ +2 (taken)
    put(16'h006E, '{8'h80, 8'hFE});               // trap
    put(16'h0070, '{8'hF5, 8'h48});               // MOV 48h,A
    put(16'h0072, '{8'h74, 8'h15});               // MOV A,#15h
    put(16'h0074, '{8'h24, 8'h27});               // ADD A,#27h    3C
    put(16'h0076, '{8'hD4});                      // DA A          42
    put(16'h0077, '{8'hF5, 8'h49});               // MOV 49h,A
    put(16'h0079, '{8'h79, 8'h50});               // MOV R1,#50h
    put(16'h007B, '{8'h74, 8'h12});               // MOV A,#12h
    put(16'h007D, '{8'hD7});                      // XCHD A,@R1    A=19 [50]=92
    put(16'h007E, '{8'hF5, 8'h4A});               // MOV 4Ah,A
    put(16'h0080, '{8'h75, 8'hF0, 8'h0C});        // MOV B,#0Ch
    put(16'h0083, '{8'hE5, 8'hF0});               // MOV A,B
    put(16'h0085, '{8'hC5, 8'h4A});               // XCH A,4Ah     A=19 [4A]=0C
    put(16'h0087, '{8'h42, 8'h4A});               // ORL 4Ah,A     1D
    put(16'h0089, '{8'h53, 8'h4A, 8'h0F});        // ANL 4Ah,#0Fh  0D
    put(16'h008C, '{8'hA2, 8'h0F});               // MOV C,21h.7   1
    put(16'h008E, '{8'hB0, 8'h00});               // ANL C,/20h.0  1
    put(16'h0090, '{8'h72, 8'h00});               // ORL C,20h.0   1
    put(16'h0092, '{8'h82, 8'h00});               // ANL C,20h.0   0
    put(16'h0094, '{8'hB3});                      // CPL C         1
    put(16'h0095, '{8'h92, 8'h01});               // MOV 20h.1,C   [20]=0A
    put(16'h0097, '{8'h0D});                      // INC R5
    put(16'h0098, '{8'h15, 8'h4A});               // DEC 4Ah       0C
    put(16'h009A, '{8'hA3});                      // INC DPTR
    put(16'h009B, '{8'hE4});                      // CLR A
    put(16'h009C, '{8'h93});                      // MOVC A,@A+DPTR  22
    put(16'h009D, '{8'hF5, 8'h4B});               // MOV 4Bh,A
    put(16'h009F, '{8'h75, 8'hD0, 8'h08});        // MOV PSW,#08h  bank 1
    put(16'h00A2, '{8'h7F, 8'h6B});               // MOV R7,#6Bh   [0F]
    put(16'h00A4, '{8'h75, 8'hD0, 8'h00});        // MOV PSW,#00h
    put(16'h00A7, '{8'h85, 8'h0F, 8'h4C});        // MOV 4Ch,0Fh
    put(16'h00AA, '{8'h78, 8'h4C});               // MOV R0,#4Ch
    put(16'h00AC, '{8'hB6, 8'h6B, 8'h02});        // CJNE @R0,#6Bh,+2 (not taken)
    put(16'h00AF, '{8'h80, 8'h01});               // SJMP +1
    put(16'h00B1, '{8'h00});
    put(16'h00B2, '{8'hB6, 8'h70, 8'h02});        // CJNE @R0,#70h,+2 (taken, CY=1)
    put(16'h00B5, '{8'h80, 8'hFE});               // trap
    put(16'h00B7, '{8'h92, 8'h02});               // MOV 20h.2,C   [20]=0E
    put(16'h00B9, '{8'h11, 8'hF8});               // ACALL 00F8h
    put(16'h00BB, '{8'hF5, 8'h4D});               // MOV 4Dh,A     5C
    put(16'h00BD, '{8'h85, 8'h4D, 8'hA0});        // MOV P2,4Dh
    put(16'h00C0, '{8'h80, 8'hFE});               // halt: SJMP $
    put(16'h00F0, '{8'h74, 8'h77, 8'h22});        // MOV A,#77h; RET
    put(16'h00F8, '{8'h74, 8'h5C, 8'h22});        // MOV A,#5Ch; RET
    put(16'h0100, '{8'h11, 8'h22, 8'h33, 8'h44}); // MOVC table

    activate = 0;
    reset = 1;
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (5) @(posedge clk);
    check("idle core makes no requests", !rom_addr_req && !ram_rd_req && !ram_wr_req);
    activate = 1;
    halt_seen = 0;
    while (halt_seen < 3) begin
      @(posedge clk);
      if (rom_addr_req && rom_ack && rom_addr == 16'h00C0) begin
        halt_seen++;
        while (rom_ack) @(posedge clk);
      end
      check("no trap reached", !(rom_addr_req && rom_addr inside {16'h0057, 16'h005C, 16'h0061,
                                                                   16'h006E, 16'h00B5}));
    end
    check("[00] R0", ram[8'h00] == 8'h4C);
    check("[01] R1", ram[8'h01] == 8'h50);
    check("[02] R2", ram[8'h02] == 8'h00);
    check("[05] R5", ram[8'h05] == 8'h01);
    check("[0F] bank1 R7", ram[8'h0F] == 8'h6B);
    check("[20] bits", ram[8'h20] == 8'h0E);
    check("[21] bits", ram[8'h21] == 8'h80);
    check("[31] stack", ram[8'h31] == 8'hBB);
    check("[32] stack", ram[8'h32] == 8'h00);
    check("[40] ADD", ram[8'h40] == 8'h01);
    check("[41] SUBB", ram[8'h41] == 8'hEE);
    check("[42] INC/SWAP", ram[8'h42] == 8'hA9);
    check("[43] DJNZ loop", ram[8'h43] == 8'h0F);
    check("[44] PUSH/POP", ram[8'h44] == 8'h0F);
    check("[45] LCALL/RET", ram[8'h45] == 8'h77);
    check("[46] MOVC", ram[8'h46] == 8'h33);
    check("[47] bit ops", ram[8'h47] == 8'h80);
    check("[48] RL/XRL", ram[8'h48] == 8'hFE);
    check("[49] DA", ram[8'h49] == 8'h42);
    check("[4A] XCH/ORL/ANL/DEC", ram[8'h4A] == 8'h0C);
    check("[4B] MOVC 2", ram[8'h4B] == 8'h22);
    check("[4C] MOV dir,dir", ram[8'h4C] == 8'h6B);
    check("[4D] ACALL", ram[8'h4D] == 8'h5C);
    check("[50] XCHD", ram[8'h50] == 8'h92);
    check("P0 reset value", p0_out == 8'hFF);
    check("P1", p1_out == 8'h77);
    check("P2", p2_out == 8'h5C);
    check("P3 reset value", p3_out == 8'hFF);
    // activate low parks the core at the next instruction boundary
    activate = 0;
    repeat (40) @(posedge clk);
    check("parked core idle", !rom_addr_req && !ram_rd_req && !ram_wr_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
