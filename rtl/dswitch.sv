// dswitch: one node of the circuit-switched data network (dNoC), made of
// five dCells serving the MBank, South, West, East and North directions.
//
// Each cell's internal line carries what enters through its port when the
// cell is in input mode; every cell's IMUX sees the lines of the four other
// cells. A circuit through the node is therefore: one cell in input mode,
// another in output mode whose ISEL points at it. Several outputs may take
// the same input (multicast). The structure follows the dSwitch drawing;
// the port split into in/out/output-enable is explained in dcell.
//
// Interface: per direction d (index = dir_e) an input word with valid
// (in_vld/in_dat), an output word with valid (out_vld/out_dat), an output
// enable (out_oe) telling the neighbour that this side drives the link, and
// the node configuration cfg (one dcell_cfg_t per direction), normally
// supplied by the tile's cFSM.
// Timing: a cell in bypass mode adds no cycle, one in pipelined mode one.
module dswitch
  import dimarch_pkg::*;
#(
  parameter int unsigned W = DNOC_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  dswitch_cfg_t           cfg,
  input  logic [NDIR-1:0]        in_vld,
  input  logic [NDIR-1:0][W-1:0] in_dat,
  output logic [NDIR-1:0]        out_vld,
  output logic [NDIR-1:0][W-1:0] out_dat,
  output logic [NDIR-1:0]        out_oe
);

  logic [NDIR-1:0]        line_vld;
  logic [NDIR-1:0][W-1:0] line_dat;

  for (genvar d = 0; d < NDIR; d++) begin : g_cell
    logic [3:0]        o_vld;
    logic [3:0][W-1:0] o_dat;

    // the four other directions, in order, own direction skipped
    for (genvar k = 0; k < 4; k++) begin : g_other
      localparam int unsigned SRC = (k < d) ? k : k + 1;
      assign o_vld[k] = line_vld[SRC];
      assign o_dat[k] = line_dat[SRC];
    end

    dcell #(.W(W)) u_cell (
      .clk, .rst,
      .cfg        (cfg[d]),
      .others_vld (o_vld),
      .others_dat (o_dat),
      .port_i_vld (in_vld[d]),
      .port_i_dat (in_dat[d]),
      .port_o_vld (out_vld[d]),
      .port_o_dat (out_dat[d]),
      .port_oe    (out_oe[d]),
      .line_vld   (line_vld[d]),
      .line_dat   (line_dat[d])
    );
  end

endmodule
