// Handshake bridge between the processor's RAM channels and the synchronous
// data memory.
//
// The processor reads through one four-phase channel (rd_req) and writes
// through another (wr_req); it never raises both at once. An OR gate merges
// the two requests into the memory enable ram_en; the direction comes from
// the processor's rnw line, held stable through the handshake. The memory
// raises ram_rfd on the clock edge that performs the access; one clock later
// a D flip-flop raises ack. The flip-flop is cleared asynchronously by
// ram_rfd falling, so the return-to-zero phase needs no clock. The OR gate,
// rfd and clocked ack follow the design; the names are this design's own.
module sa8051_ram_if (
  input  logic clk,
  input  logic reset,
  input  logic rd_req,
  input  logic wr_req,
  output logic ack,
  output logic ram_en,
  input  logic ram_rfd
);
  assign ram_en = rd_req | wr_req;

  // Asynchronous clear: system reset, or the memory's rfd falling.
  logic ack_clr;
  assign ack_clr = reset || !ram_rfd;

  always_ff @(posedge clk or posedge ack_clr) begin
    if (ack_clr) ack <= 1'b0;
    else         ack <= 1'b1;
  end

  a_one_request: assert property (@(posedge clk) !(rd_req && wr_req));
  a_ack_needs_req: assert property (@(posedge clk) ack |-> (rd_req || wr_req));
endmodule
