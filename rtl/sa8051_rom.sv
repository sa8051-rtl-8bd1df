// SA8051 program memory: a synchronous single-port block RAM used as ROM.
//
// 2**ADDR_W bytes (4 KB by default). While en is high, each rising clock
// edge reads the byte at addr into rdata and raises rfd ("ready for data",
// the memory's completion signal). rfd is cleared asynchronously as soon as
// en falls, so the handshake bridge in front of the memory can return to
// zero without waiting for a clock. A second, write-only port (load_*) fills
// the memory before the processor runs; it stands in for the initial
// contents an FPGA block RAM gets from its configuration file and is this
// design's own addition.
module sa8051_rom #(
  parameter int unsigned ADDR_W = 12
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [7:0]        rdata,
  output logic              rfd,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [7:0]        load_data
);
  logic [7:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    if (en) rdata <= mem[addr];
  end

  // rfd is cleared asynchronously by reset or by the enable falling.
  logic rfd_clr;
  assign rfd_clr = reset || !en;

  always_ff @(posedge clk or posedge rfd_clr) begin
    if (rfd_clr) rfd <= 1'b0;
    else         rfd <= 1'b1;
  end
endmodule
