// Self-checking testbench for sa8051_rom_if with the program memory behind
// it. A clocked requester plays the processor: it raises both ROM requests,
// waits for the acknowledge, checks the byte, drops the requests. Checked:
// the acknowledge arrives within two clock edges of the request (the
// bridge's worst case), the data is right when it does, the acknowledge
// returns to zero in the same instant as the requests, and one request alone
// never enables the memory.
module tb_sa8051_rom_if;
  logic clk = 0, reset, addr_req, data_req, ack, rom_en, rom_rfd, load_we;
  logic [11:0] addr, load_addr;
  logic [7:0] rdata, load_data;
  int checks = 0, failures = 0;

  sa8051_rom_if dut (.clk(clk), .reset(reset), .addr_req(addr_req), .data_req(data_req), .ack(ack),
                     .rom_en(rom_en), .rom_rfd(rom_rfd));
  sa8051_rom u_rom (.clk(clk), .reset(reset), .en(rom_en), .addr(addr), .rdata(rdata), .rfd(rom_rfd),
                    .load_we(load_we), .load_addr(load_addr), .load_data(load_data));
  always #5 clk = !clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges;
    reset = 1;
    #1 reset = 0;
    addr_req = 0; data_req = 0; addr = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); load_we = 1; load_addr = 12'(a); load_data = 8'(a ^ 8'h5A);
    end
    @(negedge clk); load_we = 0;
    // One request alone must not enable the memory (C-element join).
    @(negedge clk); addr_req = 1;
    repeat (3) @(posedge clk);
    #1 check("no enable with one request", !rom_en && !ack);
    @(negedge clk); data_req = 1; addr = 12'h012;
    #1 check("enable with both requests", rom_en);
    @(negedge clk); addr_req = 0;
    repeat (2) @(posedge clk);
    #1 check("enable held with one request down", rom_en);
    @(negedge clk); data_req = 0;
    #1 check("enable released with both down", !rom_en && !ack);
    for (int n = 0; n < 200; n++) begin
      int a;
      a = int'($urandom % 256);
      // requests rise at a random point in the clock period
      @(negedge clk); #(1 + int'($urandom % 8));
      addr = 12'(a); addr_req = 1; data_req = 1;
      edges = 0;
      while (!ack) begin @(posedge clk); edges++; #1; end
      check("ack within two clock edges", edges <= 2);
      check("ack data", rdata == 8'(a ^ 8'h5A));
      #2 addr_req = 0; data_req = 0;
      #1 check("ack returns to zero at once", !ack && !rom_en && !rom_rfd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
