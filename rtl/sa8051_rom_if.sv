// Handshake bridge between the processor's ROM channels and the synchronous
// program memory.
//
// The processor fetches with two four-phase channels whose requests rise
// together: the address channel (addr_req) and the data channel (data_req).
// A C-element joins the two requests into the memory enable rom_en, so the
// memory is enabled only when both are up and released only when both are
// down. The memory raises rom_rfd on the clock edge that reads the byte; one
// clock later a D flip-flop raises ack, which acknowledges both channels.
// The flip-flop has an asynchronous clear driven by rom_rfd, so when the
// requests fall, enable, rfd and ack fall within the same instant and the
// return-to-zero phase costs no clock. Worst case from request to ack is
// about two clock cycles. The structure (C-element, rfd, clocked ack with
// asynchronous clear) follows the design; the signal names are this
// design's own.
module sa8051_rom_if (
  input  logic clk,
  input  logic reset,
  input  logic addr_req,
  input  logic data_req,
  output logic ack,
  output logic rom_en,
  input  logic rom_rfd
);
  c_element u_join (
    .i0 (addr_req),
    .i1 (data_req),
    .q  (rom_en)
  );

  // Asynchronous clear: system reset, or the memory's rfd falling.
  logic ack_clr;
  assign ack_clr = reset || !rom_rfd;

  always_ff @(posedge clk or posedge ack_clr) begin
    if (ack_clr) ack <= 1'b0;
    else         ack <= 1'b1;
  end

  // Four-phase rule: ack is only high while a request is up.
  a_ack_needs_req: assert property (@(posedge clk) ack |-> (addr_req || data_req));
endmodule
