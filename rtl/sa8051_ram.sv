// SA8051 data memory: a synchronous single-port block RAM.
//
// 2**ADDR_W bytes (256 by default). While en is high, each rising clock
// edge either writes wdata to addr (rnw = 0) or reads addr into rdata
// (rnw = 1), and raises rfd, the memory's completion signal. rfd is cleared
// asynchronously when en falls, so the handshake bridge returns to zero
// without waiting for a clock.
module sa8051_ram #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              en,
  input  logic              rnw,
  input  logic [ADDR_W-1:0] addr,
  input  logic [7:0]        wdata,
  output logic [7:0]        rdata,
  output logic              rfd
);
  logic [7:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (rnw) rdata <= mem[addr];
      else     mem[addr] <= wdata;
    end
  end

  // rfd is cleared asynchronously by reset or by the enable falling.
  logic rfd_clr;
  assign rfd_clr = reset || !en;

  always_ff @(posedge clk or posedge rfd_clr) begin
    if (rfd_clr) rfd <= 1'b0;
    else         rfd <= 1'b1;
  end
endmodule
