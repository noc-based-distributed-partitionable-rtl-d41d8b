// dcell: one dSwitch cell, serving one of the five directions (MBank,
// South, West, East, North) of a dNoC node.
//
// Following the dSwitch drawing, a cell holds an IMUX that chooses one of
// the four other directions (ISEL), a register REG on the IMUX output, a
// PMUX that takes either REG (pipelined mode) or the IMUX output directly
// (single cycle multi-hop transfer, SCMHT), and an I/O stage (IOSEL). In
// output mode the PMUX result drives the cell's port; in input mode the
// port's incoming data enters the node on the cell's internal line, from
// which the other four cells can select it.
//
// The half-duplex tri-state pin of the drawing is split here into
// port_i / port_o / port_oe, since a synthesizable on-chip link needs no
// tri-state: the neighbour sees port_o only while port_oe is high. A valid
// bit travels with every word; it is this design's own addition so that a
// receiver can tell a word from an idle link. REG has no reset on the data
// and a synchronous reset on the valid bit.
//
// Interface:
//   others_vld/dat : the internal lines of the four other cells, in the
//                    order M,S,W,E,N with this cell's own direction skipped
//   line_vld/dat   : this cell's internal line (port input in input mode,
//                    zero in output mode)
//   cfg            : ISEL / PSEL / IOSEL
// Timing: the bypass path is combinational; the pipelined path adds one
// cycle per cell.
// Circuit note: in a mesh of bypassable cells, lint reports the IMUX as part
// of a combinational loop (port_i -> line -> IMUX -> port_o -> neighbour).
// The loop is structural only: it closes only if a ring of cells is
// programmed in bypassed output mode, which no valid schedule does.
module dcell
  import dimarch_pkg::*;
#(
  parameter int unsigned W = DNOC_W
) (
  input  logic             clk,
  input  logic             rst,
  input  dcell_cfg_t       cfg,
  input  logic [3:0]       others_vld,
  input  logic [3:0][W-1:0] others_dat,
  input  logic             port_i_vld,
  input  logic [W-1:0]     port_i_dat,
  output logic             port_o_vld,
  output logic [W-1:0]     port_o_dat,
  output logic             port_oe,
  output logic             line_vld,
  output logic [W-1:0]     line_dat
);

  logic         imux_vld, reg_vld, pmux_vld;
  logic [W-1:0] imux_dat, reg_dat, pmux_dat;

  // IMUX
  assign imux_vld = others_vld[cfg.isel];
  assign imux_dat = others_dat[cfg.isel];

  // REG
  always_ff @(posedge clk) begin
    if (rst) reg_vld <= 1'b0;
    else     reg_vld <= imux_vld;
    reg_dat <= imux_dat;
  end

  // PMUX
  assign pmux_vld = cfg.psel ? reg_vld : imux_vld;
  assign pmux_dat = cfg.psel ? reg_dat : imux_dat;

  // IOSEL: half-duplex port
  assign port_oe    = cfg.iosel;
  assign port_o_vld = cfg.iosel & pmux_vld;
  assign port_o_dat = cfg.iosel ? pmux_dat : '0;
  assign line_vld   = ~cfg.iosel & port_i_vld;
  assign line_dat   = cfg.iosel ? '0 : port_i_dat;

endmodule
