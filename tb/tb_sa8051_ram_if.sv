// Self-checking testbench for sa8051_ram_if with the data memory behind it.
// A requester plays the processor: random reads (rd_req) and writes
// (wr_req) with rnw held through the handshake, checked against a reference
// array; the acknowledge must come within two clock edges and drop in the
// same instant as the request.
module tb_sa8051_ram_if;
  logic clk = 0, reset, rd_req, wr_req, ack, ram_en, ram_rfd, rnw;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] ref_mem [256];
  logic       valid [256];
  int checks = 0, failures = 0;

  sa8051_ram_if dut (.clk(clk), .reset(reset), .rd_req(rd_req), .wr_req(wr_req), .ack(ack),
                     .ram_en(ram_en), .ram_rfd(ram_rfd));
  sa8051_ram u_ram (.clk(clk), .reset(reset), .en(ram_en), .rnw(rnw), .addr(addr), .wdata(wdata),
                    .rdata(rdata), .rfd(ram_rfd));
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
    rd_req = 0; wr_req = 0; rnw = 1; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) valid[i] = 0;
    for (int n = 0; n < 600; n++) begin
      logic wr;
      wr = (n < 100) ? 1'b1 : 1'($urandom);
      @(negedge clk); #(1 + int'($urandom % 8));
      addr = 8'($urandom % 64); wdata = 8'($urandom); rnw = !wr;
      if (wr) wr_req = 1; else rd_req = 1;
      #1 check("enable follows either request", ram_en);
      edges = 0;
      while (!ack) begin @(posedge clk); edges++; #1; end
      check("ack within two clock edges", edges <= 2);
      if (wr) begin ref_mem[addr] = wdata; valid[addr] = 1; end
      else if (valid[addr]) check("read data", rdata == ref_mem[addr]);
      #2 rd_req = 0; wr_req = 0;
      #1 check("ack returns to zero at once", !ack && !ram_en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
