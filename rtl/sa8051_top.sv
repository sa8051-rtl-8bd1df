// SA8051 microcontroller system.
//
// The processor core (sa8051_cpu) with its 4 KB program memory and 256-byte
// data memory, both synchronous block RAMs, joined to the core through the
// four-phase handshake bridges sa8051_rom_if and sa8051_ram_if. The clock
// drives only the memories, the bridges' acknowledge flip-flops and the core's
// step sequencer; an idle core (activate low) makes no memory requests, so
// the memories stay disabled. Four 8-bit input ports and four 8-bit output
// ports connect the core to the outside.
//
// Interface: clk; reset (asynchronous, active high) initialises the core's
// PC and SFRs; activate starts the core and, when low, parks it at the next
// instruction boundary: an nc2p latch holds the core's activate high until
// the current instruction ends. rom_load_* writes the program memory while the core
// is held in reset or idle (a stand-in for block-RAM initial contents).
// insn_done pulses once per executed instruction.
module sa8051_top #(
  parameter int unsigned ROM_ADDR_W = 12,   // 4 KB program memory
  parameter int unsigned RAM_ADDR_W = 8     // 256 B data memory
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  activate,
  input  logic [7:0]            p0_in,
  input  logic [7:0]            p1_in,
  input  logic [7:0]            p2_in,
  input  logic [7:0]            p3_in,
  output logic [7:0]            p0_out,
  output logic [7:0]            p1_out,
  output logic [7:0]            p2_out,
  output logic [7:0]            p3_out,
  input  logic                  rom_load_we,
  input  logic [ROM_ADDR_W-1:0] rom_load_addr,
  input  logic [7:0]            rom_load_data,
  output logic                  insn_done
);
  logic [15:0] rom_addr;
  logic        rom_addr_req, rom_data_req, rom_ack, rom_en, rom_rfd;
  logic [7:0]  rom_data;
  logic [7:0]  ram_addr, ram_wdata, ram_rdata;
  logic        ram_rnw, ram_rd_req, ram_wr_req, ram_ack, ram_en, ram_rfd;

  // activate as seen by the core: raised at once, but dropped only at an
  // instruction boundary (insn_done), so a core that is told to stop always
  // finishes the instruction it is in. nc2p: i0 = 0 forces 1, i0 = i1 = 1
  // forces 0, otherwise it holds.
  logic cpu_activate;
  nc2p u_activate_hold (
    .i0 (!activate),
    .i1 (insn_done),
    .q  (cpu_activate)
  );

  sa8051_cpu u_cpu (
    .clk          (clk),
    .reset        (reset),
    .activate     (cpu_activate),
    .rom_addr     (rom_addr),
    .rom_addr_req (rom_addr_req),
    .rom_data_req (rom_data_req),
    .rom_ack      (rom_ack),
    .rom_data     (rom_data),
    .ram_addr     (ram_addr),
    .ram_wdata    (ram_wdata),
    .ram_rnw      (ram_rnw),
    .ram_rd_req   (ram_rd_req),
    .ram_wr_req   (ram_wr_req),
    .ram_ack      (ram_ack),
    .ram_rdata    (ram_rdata),
    .p0_in        (p0_in),
    .p1_in        (p1_in),
    .p2_in        (p2_in),
    .p3_in        (p3_in),
    .p0_out       (p0_out),
    .p1_out       (p1_out),
    .p2_out       (p2_out),
    .p3_out       (p3_out),
    .insn_done    (insn_done)
  );

  sa8051_rom_if u_rom_if (
    .clk      (clk),
    .reset    (reset),
    .addr_req (rom_addr_req),
    .data_req (rom_data_req),
    .ack      (rom_ack),
    .rom_en   (rom_en),
    .rom_rfd  (rom_rfd)
  );

  sa8051_rom #(.ADDR_W(ROM_ADDR_W)) u_rom (
    .clk       (clk),
    .reset     (reset),
    .en        (rom_en),
    .addr      (rom_addr[ROM_ADDR_W-1:0]),
    .rdata     (rom_data),
    .rfd       (rom_rfd),
    .load_we   (rom_load_we),
    .load_addr (rom_load_addr),
    .load_data (rom_load_data)
  );

  sa8051_ram_if u_ram_if (
    .clk     (clk),
    .reset   (reset),
    .rd_req  (ram_rd_req),
    .wr_req  (ram_wr_req),
    .ack     (ram_ack),
    .ram_en  (ram_en),
    .ram_rfd (ram_rfd)
  );

  sa8051_ram #(.ADDR_W(RAM_ADDR_W)) u_ram (
    .clk   (clk),
    .reset (reset),
    .en    (ram_en),
    .rnw   (ram_rnw),
    .addr  (ram_addr[RAM_ADDR_W-1:0]),
    .wdata (ram_wdata),
    .rdata (ram_rdata),
    .rfd   (ram_rfd)
  );
endmodule
