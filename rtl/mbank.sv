// mbank: one memory bank of the distributed memory, written as a
// single-port synchronous SRAM array so that synthesis can map it to an
// SRAM macro.
//
// The document describes the banks as SRAM macros of typically 2 to 4 KB,
// sized to align with the columns of the computation fabric, and has them
// stream one dNoC word at a time. This design takes 2 KB as the default:
// DEPTH = 64 words of W = 256 bits, one word per dNoC transfer. The single
// read/write port and the one-cycle read latency are this design's own
// choices.
//
// Interface and timing:
//   en & we  : wdata is written to mem[addr] at the rising edge.
//   en & !we : mem[addr] appears on rdata after the rising edge (1 cycle).
//   rdata holds its value while en is low. Contents are not reset.
module mbank #(
  parameter int unsigned W     = 256,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
