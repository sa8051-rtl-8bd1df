// Self-checking testbench for sa8051_rom at its full 4 KB size: fills the
// memory through the load port with a pattern, reads addresses back with the
// enable, and checks the one-clock read latency of rfd and its immediate
// clearing when the enable falls.
module tb_sa8051_rom;
  logic clk = 0, reset, en, rfd, load_we;
  logic [11:0] addr, load_addr;
  logic [7:0] rdata, load_data;
  int checks = 0, failures = 0;
  sa8051_rom dut (.clk(clk), .reset(reset), .en(en), .addr(addr), .rdata(rdata), .rfd(rfd),
                  .load_we(load_we), .load_addr(load_addr), .load_data(load_data));
  always #5 clk = !clk;

  function automatic logic [7:0] pat(int a);
    return 8'((a * 37 + (a >> 8) * 11 + 5) & 255);
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; #1 reset = 0;
    en = 0; load_we = 0; addr = 0; load_addr = 0; load_data = 0;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk); load_we = 1; load_addr = 12'(a); load_data = pat(a);
    end
    @(negedge clk); load_we = 0;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = (n < 2) ? n * 4095 : int'($urandom % 4096);
      @(negedge clk); addr = 12'(a); en = 1;
      #1 check("rfd low before clock", !rfd);
      @(posedge clk); #1;
      check("rfd after one clock", rfd);
      check("read data", rdata == pat(a));
      @(negedge clk); en = 0;
      #1 check("rfd cleared with en", !rfd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
