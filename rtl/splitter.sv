// splitter: a switch on an instruction-network bus segment. Open (split),
// the two sides are separate buses that can be programmed in parallel;
// closed, a message broadcast on one side also reaches the other side in the
// same cycle.
//
// As in the document, a splitter changes state when its iSwitch receives a
// message that toggles it, and every splitter is open after reset. The
// bus is carried both ways (a_i -> b_o and b_i -> a_o); a vertical
// splitter, whose bus is driven only from the sequencer side, uses one
// direction.
//
// Interface: toggle (one-cycle pulse from the zFSM) flips the state at the
// rising edge; closed shows it. The pass-through is combinational.
module splitter
  import dimarch_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  toggle,
  output logic  closed,
  input  imsg_t a_i,
  output imsg_t a_o,
  input  imsg_t b_i,
  output imsg_t b_o
);

  always_ff @(posedge clk) begin
    if (rst)         closed <= 1'b0;
    else if (toggle) closed <= ~closed;
  end

  assign b_o = closed ? a_i : '0;
  assign a_o = closed ? b_i : '0;

endmodule
