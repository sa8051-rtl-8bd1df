// Self-checking testbench for sa8051_ram: random writes and reads against a
// reference array, with the rfd completion timing checked on every access.
module tb_sa8051_ram;
  logic clk = 0, reset, en, rnw, rfd;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] ref_mem [256];
  logic       valid [256];
  int checks = 0, failures = 0;
  sa8051_ram dut (.clk(clk), .reset(reset), .en(en), .rnw(rnw), .addr(addr), .wdata(wdata), .rdata(rdata), .rfd(rfd));
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
    reset = 1; #1 reset = 0;
    en = 0; rnw = 1; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) valid[i] = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = 8'($urandom);
      rnw = (n < 300) ? 1'b0 : 1'($urandom);
      wdata = 8'($urandom);
      en = 1;
      @(posedge clk); #1;
      check("rfd", rfd);
      if (!rnw) begin ref_mem[addr] = wdata; valid[addr] = 1; end
      else if (valid[addr]) check("read data", rdata == ref_mem[addr]);
      @(negedge clk); en = 0;
      #1 check("rfd cleared", !rfd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
