// End-to-end testbench for sa8051_top at its default sizes (4 KB program
// memory, 256 B data memory).
//
// Six small programs, hand-assembled below, are loaded through the program
// memory load port and run to their final "SJMP $": a bubble sort of eight
// bytes copied from a ROM table (MOVC), Euclid's GCD of the P1/P2 inputs,
// Fibonacci numbers F0..F12 in RAM, a byte-to-ASCII-binary conversion, a
// count of negative table entries (JNB on an ACC bit), and a signed
// byte-to-16-bit widening with a 16-bit add. Inputs and tables are random;
// expected results are computed here in SystemVerilog. During the sort the
// core is parked by dropping activate, and the GCD run is reset part-way and
// restarted.
//
// Also checked and counted: every memory handshake acknowledges within two
// clock edges of the enable; MOV-class instructions never touch the ALU;
// SFR operands are served without a RAM handshake; and each mechanism
// (ROM/RAM handshakes, regular/irregular decode, bit instruction, SFR
// bypass, ALU bypass, PAR loaded from the ALU, taken branch, idle, reset)
// happens at least once.
module tb_sa8051_top;
  logic clk = 0, reset, activate;
  logic [7:0] p0_in, p1_in, p2_in, p3_in, p0_out, p1_out, p2_out, p3_out;
  logic rom_load_we;
  logic [11:0] rom_load_addr;
  logic [7:0] rom_load_data;
  logic insn_done;
  int checks = 0, failures = 0;

  sa8051_top dut (
    .clk(clk), .reset(reset), .activate(activate),
    .p0_in(p0_in), .p1_in(p1_in), .p2_in(p2_in), .p3_in(p3_in),
    .p0_out(p0_out), .p1_out(p1_out), .p2_out(p2_out), .p3_out(p3_out),
    .rom_load_we(rom_load_we), .rom_load_addr(rom_load_addr), .rom_load_data(rom_load_data),
    .insn_done(insn_done));

  always #5 clk = !clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- monitors
  int n_rom_hs = 0, n_ram_rd = 0, n_ram_wr = 0, n_regular = 0, n_irregular = 0;
  int n_bit = 0, n_sfr_bypass = 0, n_alu_bypass = 0, n_par_alu = 0, n_branch = 0;
  int n_idle = 0, n_reset = 0, n_insn = 0;
  int rom_wait = 0, ram_wait = 0, ram_in_insn = 0;
  logic prev_par_alu = 0, prev_rom_en = 0, prev_ram_en = 0, prev_rom_ack = 0, prev_ram_ack = 0;
  logic [4:0] alu_op_at_start = '0;
  logic [7:0] ir;

  function automatic logic is_mov(logic [7:0] op);
    return (op[7:4] == 4'hE && op[3:0] >= 4'h5) || (op[7:4] == 4'hF && op[3:0] >= 4'h5) ||
           (op[7:4] == 4'h7 && op[3:0] >= 4'h4) || (op[7:4] == 4'h8 && op[3:0] >= 4'h5) ||
           (op[7:4] == 4'hA && op[3:0] >= 4'h6);
  endfunction

  always @(posedge clk) begin
    // counts of clock edges from enable to acknowledge
    if (dut.rom_en && !dut.rom_ack) rom_wait <= rom_wait + 1;
    if (dut.ram_en && !dut.ram_ack) ram_wait <= ram_wait + 1;
  end

  always @(negedge clk) begin
    ir = dut.u_cpu.ir;
    // PAR is loaded in the last S_EXEC cycle before the ROM request rises
    if (dut.rom_en && !prev_rom_en && prev_par_alu) n_par_alu++;
    if (dut.rom_ack && !prev_rom_ack) begin
      n_rom_hs++;
      check("ROM ack within two clock edges", rom_wait <= 2);
    end
    if (dut.ram_ack && !prev_ram_ack) begin
      if (dut.ram_rnw) n_ram_rd++; else n_ram_wr++;
      ram_in_insn++;
      check("RAM ack within two clock edges", ram_wait <= 2);
    end
    if (!dut.rom_en) rom_wait = 0;
    if (!dut.ram_en) ram_wait = 0;
    if (dut.u_cpu.state == 2'd1 && dut.u_cpu.step == 4'd15) n_branch++;
    if (!activate && !reset && !dut.rom_en && !dut.ram_en) n_idle++;
    if (insn_done && !reset) begin
      n_insn++;
      if (dut.u_cpu.regular) n_regular++; else n_irregular++;
      if (ir inside {8'h10, 8'h20, 8'h30, 8'h72, 8'h82, 8'h92, 8'hA0, 8'hA2, 8'hB0, 8'hB2, 8'hC2, 8'hD2})
        n_bit++;
      if (ir inside {8'hE5, 8'hF5, 8'h95} && dut.u_cpu.rar[7]) begin
        check("SFR operand without RAM handshake", ram_in_insn == 0);
        n_sfr_bypass++;
      end
      if (is_mov(ir)) begin
        check($sformatf("MOV %h bypasses the ALU", ir), 5'(dut.u_cpu.alu_op) == alu_op_at_start);
        n_alu_bypass++;
      end
      alu_op_at_start = 5'(dut.u_cpu.alu_op);
      ram_in_insn = 0;
    end
    prev_par_alu = dut.u_cpu.par_from_alu;
    if (reset) alu_op_at_start = 5'(dut.u_cpu.alu_op);
    prev_rom_en = dut.rom_en; prev_ram_en = dut.ram_en;
    prev_rom_ack = dut.rom_ack; prev_ram_ack = dut.ram_ack;
  end

  // ---------------------------------------------------------------- helpers
  logic [7:0] img [768];

  task automatic clear_img();
    for (int i = 0; i < 768; i++) img[i] = 8'h00;
  endtask

  task automatic put(int addr, logic [7:0] bytes []);
    foreach (bytes[i]) img[addr + i] = bytes[i];
  endtask

  // Load the image through the load port with the core held in reset.
  task automatic load_and_start();
    activate = 0;
    reset = 1;
    for (int i = 0; i < 768; i++) begin
      @(negedge clk);
      rom_load_we = 1; rom_load_addr = 12'(i); rom_load_data = img[i];
    end
    @(negedge clk); rom_load_we = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    @(negedge clk);
    activate = 1;
  endtask

  // Run until the core has executed "SJMP $" at halt_pc.
  task automatic run_to(logic [15:0] halt_pc, int max_cycles, string name);
    int cyc;
    cyc = 0;
    while (!(insn_done && dut.u_cpu.pc == halt_pc && dut.u_cpu.ir == 8'h80) && cyc < max_cycles) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("%s reaches its end", name), cyc < max_cycles);
    $display("%s: %0d clock cycles", name, cyc);
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- programs
  initial begin
    logic [7:0] tab [8];
    logic [7:0] srt [8];
    logic [7:0] t;
    int a, b, x, y, neg;
    logic [15:0] wide;
    rom_load_we = 0; rom_load_addr = 0; rom_load_data = 0;
    p0_in = 0; p1_in = 0; p2_in = 0; p3_in = 0;
    activate = 0; reset = 1;
    repeat (3) @(negedge clk);

    // ---- sort: copy 8 bytes from ROM 0200h to RAM 40h..47h, bubble sort
    clear_img();
    put(16'h0000, '{8'h90, 8'h02, 8'h00});   // MOV DPTR,#0200h
    put(16'h0003, '{8'h78, 8'h40});          // MOV R0,#40h
    put(16'h0005, '{8'h7A, 8'h08});          // MOV R2,#8
    put(16'h0007, '{8'hE4});                 // cp: CLR A
    put(16'h0008, '{8'h93});                 // MOVC A,@A+DPTR
    put(16'h0009, '{8'hF6});                 // MOV @R0,A
    put(16'h000A, '{8'hA3});                 // INC DPTR
    put(16'h000B, '{8'h08});                 // INC R0
    put(16'h000C, '{8'hDA, 8'hF9});          // DJNZ R2,cp
    put(16'h000E, '{8'h7B, 8'h07});          // MOV R3,#7
    put(16'h0010, '{8'h78, 8'h40});          // outer: MOV R0,#40h
    put(16'h0012, '{8'h7A, 8'h07});          // MOV R2,#7
    put(16'h0014, '{8'hE6});                 // inner: MOV A,@R0
    put(16'h0015, '{8'hF5, 8'h30});          // MOV 30h,A
    put(16'h0017, '{8'h08});                 // INC R0
    put(16'h0018, '{8'hE6});                 // MOV A,@R0
    put(16'h0019, '{8'hC3});                 // CLR C
    put(16'h001A, '{8'h95, 8'h30});          // SUBB A,30h
    put(16'h001C, '{8'h50, 8'h08});          // JNC noswap
    put(16'h001E, '{8'hE6});                 // MOV A,@R0
    put(16'h001F, '{8'h18});                 // DEC R0
    put(16'h0020, '{8'hF6});                 // MOV @R0,A
    put(16'h0021, '{8'h08});                 // INC R0
    put(16'h0022, '{8'hE5, 8'h30});          // MOV A,30h
    put(16'h0024, '{8'hF6});                 // MOV @R0,A
    put(16'h0025, '{8'h00});                 // NOP
    put(16'h0026, '{8'hDA, 8'hEC});          // noswap: DJNZ R2,inner
    put(16'h0028, '{8'hDB, 8'hE6});          // DJNZ R3,outer
    put(16'h002A, '{8'hE5, 8'h40});          // MOV A,40h
    put(16'h002C, '{8'hF5, 8'h80});          // MOV P0,A
    put(16'h002E, '{8'hE5, 8'h47});          // MOV A,47h
    put(16'h0030, '{8'hF5, 8'h90});          // MOV P1,A
    put(16'h0032, '{8'h80, 8'hFE});          // SJMP $
    for (int i = 0; i < 8; i++) begin
      tab[i] = 8'($urandom);
      if (i == 3) tab[i] = tab[0];            // a duplicate value
      img[16'h0200 + i] = tab[i];
      srt[i] = tab[i];
    end
    srt.sort();
    load_and_start();
    // park the core for a while in the middle of the run
    repeat (1500) @(negedge clk);
    activate = 0;
    repeat (60) @(negedge clk);
    check("parked core makes no memory requests", !dut.rom_en && !dut.ram_en);
    activate = 1;
    run_to(16'h0032, 200000, "sort");
    for (int i = 0; i < 8; i++)
      check($sformatf("sort RAM[%0h]", 8'h40 + i), dut.u_ram.mem[8'h40 + i] == srt[i]);
    check("sort P0 = minimum", p0_out == srt[0]);
    check("sort P1 = maximum", p1_out == srt[7]);

    // ---- GCD of P1 and P2 by subtraction, result on P3
    clear_img();
    put(16'h0000, '{8'hE5, 8'h90});          // MOV A,P1
    put(16'h0002, '{8'hFE});                 // MOV R6,A
    put(16'h0003, '{8'hE5, 8'hA0});          // MOV A,P2
    put(16'h0005, '{8'hFF});                 // MOV R7,A
    put(16'h0006, '{8'hEE});                 // loop: MOV A,R6
    put(16'h0007, '{8'hB5, 8'h07, 8'h02});   // CJNE A,07h,ne
    put(16'h000A, '{8'h80, 8'h0E});          // SJMP done
    put(16'h000C, '{8'h40, 8'h06});          // ne: JC less
    put(16'h000E, '{8'hC3});                 // CLR C
    put(16'h000F, '{8'h9F});                 // SUBB A,R7
    put(16'h0010, '{8'hFE});                 // MOV R6,A
    put(16'h0011, '{8'h80, 8'hF3});          // SJMP loop
    put(16'h0014, '{8'hEF});                 // less: MOV A,R7
    put(16'h0015, '{8'hC3});                 // CLR C
    put(16'h0016, '{8'h9E});                 // SUBB A,R6
    put(16'h0017, '{8'hFF});                 // MOV R7,A
    put(16'h0018, '{8'h80, 8'hEC});          // SJMP loop
    put(16'h001A, '{8'hEE});                 // done: MOV A,R6
    put(16'h001B, '{8'hF5, 8'hB0});          // MOV P3,A
    put(16'h001D, '{8'h80, 8'hFE});          // SJMP $
    a = 1 + int'($urandom % 120) * 2; b = 2 + int'($urandom % 60) * 4;
    p1_in = 8'(a); p2_in = 8'(b);
    x = a; y = b;
    while (y != 0) begin t = 8'(x % y); x = y; y = int'(t); end
    load_and_start();
    // reset part-way through, then run again from the start
    repeat (300) @(negedge clk);
    reset = 1; n_reset++;
    repeat (3) @(negedge clk);
    check("reset returns PC to 0", dut.u_cpu.pc == 16'h0000);
    reset = 0;
    run_to(16'h001D, 400000, "gcd");
    check($sformatf("gcd(%0d,%0d) = %0d", a, b, x), p3_out == 8'(x));

    // ---- Fibonacci F0..F12 into RAM 40h..4Ch, F12 on P0
    clear_img();
    put(16'h0000, '{8'h78, 8'h40});          // MOV R0,#40h
    put(16'h0002, '{8'h76, 8'h00});          // MOV @R0,#0
    put(16'h0004, '{8'h08});                 // INC R0
    put(16'h0005, '{8'h76, 8'h01});          // MOV @R0,#1
    put(16'h0007, '{8'h7A, 8'h0B});          // MOV R2,#11
    put(16'h0009, '{8'hE6});                 // loop: MOV A,@R0
    put(16'h000A, '{8'h18});                 // DEC R0
    put(16'h000B, '{8'h26});                 // ADD A,@R0
    put(16'h000C, '{8'h08});                 // INC R0
    put(16'h000D, '{8'h08});                 // INC R0
    put(16'h000E, '{8'hF6});                 // MOV @R0,A
    put(16'h000F, '{8'hDA, 8'hF8});          // DJNZ R2,loop
    put(16'h0011, '{8'hF5, 8'h80});          // MOV P0,A
    put(16'h0013, '{8'h80, 8'hFE});          // SJMP $
    load_and_start();
    run_to(16'h0013, 100000, "fibonacci");
    x = 0; y = 1;
    for (int i = 0; i <= 12; i++) begin
      check($sformatf("fib RAM[%0h]", 8'h40 + i), dut.u_ram.mem[8'h40 + i] == 8'(x));
      t = 8'(x + y); x = y; y = int'(t);
    end
    check("fib P0 = F12", p0_out == 8'd144);

    // ---- int2bin: P1 as eight ASCII digits at 50h..57h, MSB first
    clear_img();
    put(16'h0000, '{8'hE5, 8'h90});          // MOV A,P1
    put(16'h0002, '{8'h78, 8'h50});          // MOV R0,#50h
    put(16'h0004, '{8'h7A, 8'h08});          // MOV R2,#8
    put(16'h0006, '{8'h33});                 // loop: RLC A
    put(16'h0007, '{8'hFB});                 // MOV R3,A
    put(16'h0008, '{8'h74, 8'h30});          // MOV A,#'0'
    put(16'h000A, '{8'h34, 8'h00});          // ADDC A,#0
    put(16'h000C, '{8'hF6});                 // MOV @R0,A
    put(16'h000D, '{8'h08});                 // INC R0
    put(16'h000E, '{8'hEB});                 // MOV A,R3
    put(16'h000F, '{8'hDA, 8'hF5});          // DJNZ R2,loop
    put(16'h0011, '{8'h80, 8'hFE});          // SJMP $
    p1_in = 8'($urandom);
    load_and_start();
    run_to(16'h0011, 100000, "int2bin");
    for (int i = 0; i < 8; i++)
      check($sformatf("int2bin digit %0d", i), dut.u_ram.mem[8'h50 + i] == (p1_in[7 - i] ? 8'h31 : 8'h30));

    // ---- negcnt: count table entries with bit 7 set, result on P2
    clear_img();
    put(16'h0000, '{8'h90, 8'h02, 8'h00});   // MOV DPTR,#0200h
    put(16'h0003, '{8'h7A, 8'h08});          // MOV R2,#8
    put(16'h0005, '{8'h7B, 8'h00});          // MOV R3,#0
    put(16'h0007, '{8'hE4});                 // loop: CLR A
    put(16'h0008, '{8'h93});                 // MOVC A,@A+DPTR
    put(16'h0009, '{8'hA3});                 // INC DPTR
    put(16'h000A, '{8'h30, 8'hE7, 8'h01});   // JNB ACC.7,skip
    put(16'h000D, '{8'h0B});                 // INC R3
    put(16'h000E, '{8'hDA, 8'hF7});          // skip: DJNZ R2,loop
    put(16'h0010, '{8'hEB});                 // MOV A,R3
    put(16'h0011, '{8'hF5, 8'hA0});          // MOV P2,A
    put(16'h0013, '{8'h80, 8'hFE});          // SJMP $
    neg = 0;
    for (int i = 0; i < 8; i++) begin
      img[16'h0200 + i] = 8'($urandom);
      if (img[16'h0200 + i][7]) neg++;
    end
    load_and_start();
    run_to(16'h0013, 100000, "negcnt");
    check($sformatf("negcnt = %0d", neg), p2_out == 8'(neg));

    // ---- cast: sign-extend P1 to 16 bits, add 0123h, result on P2:P3
    clear_img();
    put(16'h0000, '{8'hE5, 8'h90});          // MOV A,P1
    put(16'h0002, '{8'h33});                 // RLC A        (CY = sign)
    put(16'h0003, '{8'h95, 8'hE0});          // SUBB A,ACC   (00h or FFh)
    put(16'h0005, '{8'hFA});                 // MOV R2,A
    put(16'h0006, '{8'hE5, 8'h90});          // MOV A,P1
    put(16'h0008, '{8'h24, 8'h23});          // ADD A,#23h
    put(16'h000A, '{8'hF5, 8'hB0});          // MOV P3,A
    put(16'h000C, '{8'hEA});                 // MOV A,R2
    put(16'h000D, '{8'h34, 8'h01});          // ADDC A,#01h
    put(16'h000F, '{8'hF5, 8'hA0});          // MOV P2,A
    put(16'h0011, '{8'h80, 8'hFE});          // SJMP $
    p1_in = 8'h80 | 8'($urandom);             // a negative value
    load_and_start();
    run_to(16'h0011, 100000, "cast");
    wide = 16'($signed(p1_in)) + 16'h0123;
    check($sformatf("cast %h -> %h", p1_in, wide), {p2_out, p3_out} == wide);

    // ---- every mechanism happened
    $display("ROM handshakes %0d, RAM reads %0d, RAM writes %0d, instructions %0d",
             n_rom_hs, n_ram_rd, n_ram_wr, n_insn);
    $display("regular %0d, irregular %0d, bit %0d, SFR bypass %0d, ALU bypass %0d",
             n_regular, n_irregular, n_bit, n_sfr_bypass, n_alu_bypass);
    $display("PAR from ALU %0d, taken branches %0d, idle cycles %0d, resets %0d",
             n_par_alu, n_branch, n_idle, n_reset);
    check("ROM handshake seen", n_rom_hs > 0);
    check("RAM read handshake seen", n_ram_rd > 0);
    check("RAM write handshake seen", n_ram_wr > 0);
    check("regular decode seen", n_regular > 0);
    check("irregular decode seen", n_irregular > 0);
    check("bit instruction seen", n_bit > 0);
    check("SFR bypass seen", n_sfr_bypass > 0);
    check("ALU bypass seen", n_alu_bypass > 0);
    check("PAR loaded from ALU seen", n_par_alu > 0);
    check("taken branch seen", n_branch > 0);
    check("idle seen", n_idle > 0);
    check("reset seen", n_reset > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
