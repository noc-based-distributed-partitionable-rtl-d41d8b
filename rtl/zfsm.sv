// zfsm: instruction decoder of a memory tile. It takes the messages that
// the tile's iSwitch has identified as addressed to this tile and acts on
// them: it toggles the tile's vertical or horizontal splitter, or
// programs the mFSM (addressing, loop and delays, start, stop) or the cFSM
// (configuration slots, schedule start, stop).
//
// The document says only that the zFSM analyses a message and acts on it,
// and that setting a splitter is the third cycle of identification,
// decoding and set/reset. The opcodes and payload layout (dimarch_pkg) are
// this design's own. The decoder is combinational on the registered message
// from the iSwitch; the targets take the command at the next rising edge.
//
// Interface: z_i from the iSwitch; one strobe per action with its record.
module zfsm
  import dimarch_pkg::*;
(
  input  imsg_t      z_i,
  output logic       vsplit_toggle,
  output logic       hsplit_toggle,
  output logic       mf_addr_we,
  output mfsm_addr_t mf_addr,
  output logic       mf_start,
  output mfsm_loop_t mf_loop,
  output logic       mf_dly_we,
  output delays_t    mf_dly,
  output logic       mf_stop,
  output logic       cf_slot_we,
  output cfsm_slot_t cf_slot,
  output logic       cf_start,
  output cfsm_loop_t cf_loop,
  output logic       cf_stop
);

  logic v;
  assign v = z_i.vld;

  assign vsplit_toggle = v && z_i.op == OP_VSPLIT;
  assign hsplit_toggle = v && z_i.op == OP_HSPLIT;
  assign mf_addr_we    = v && z_i.op == OP_MFSM_ADDR;
  assign mf_start      = v && z_i.op == OP_MFSM_START;
  assign mf_dly_we     = v && z_i.op == OP_MFSM_DLY;
  assign mf_stop       = v && z_i.op == OP_STOP && z_i.pay[0];
  assign cf_slot_we    = v && z_i.op == OP_CFSM_SLOT;
  assign cf_start      = v && z_i.op == OP_CFSM_START;
  assign cf_stop       = v && z_i.op == OP_STOP && z_i.pay[1];

  assign mf_addr = mfsm_addr_t'(z_i.pay[$bits(mfsm_addr_t)-1:0]);
  assign mf_loop = mfsm_loop_t'(z_i.pay[$bits(mfsm_loop_t)-1:0]);
  assign mf_dly  = delays_t'(z_i.pay[$bits(delays_t)-1:0]);
  assign cf_slot = cfsm_slot_t'(z_i.pay[$bits(cfsm_slot_t)-1:0]);
  assign cf_loop = cfsm_loop_t'(z_i.pay[$bits(cfsm_loop_t)-1:0]);

endmodule
