// mtile: one memory tile (X,Y) of the distributed memory. It groups an
// mBank with its mFSM, the dNoC node (dSwitch) with its cFSM, the iNoC node
// (iSwitch) with its zFSM, and the two iNoC splitters the tile owns, as in
// the tile drawing of the architecture.
//
// Data: the mFSM streams between the mBank and the MBank port of the
// dSwitch; the South, West, East and North ports of the dSwitch are the
// tile's dNoC links. Instructions: the vertical bus of the column enters at
// v_i and leaves toward row Y+1 through the tile's vertical splitter; the
// horizontal bus of the row is joined to the western neighbour through the
// tile's horizontal splitter. Which splitter a tile owns (the one below it
// and the one to its west) is this design's reading of the partitioning
// example, where a tile is told to close the splitter between itself and
// its western neighbour.
//
// Interface: dn_i_* / dn_o_* / dn_oe carry the four outer dSwitch ports,
// indexed by dir_e (index DIR_M unused). h_from_w is the western
// neighbour's eastward bus before this tile's splitter, h_to_w leaves
// through it; h_from_e arrives already through the eastern tile's splitter;
// h_to_e leaves toward it. Status outputs show splitter and controller state.
module mtile
  import dimarch_pkg::*;
#(
  parameter int unsigned X     = 0,
  parameter int unsigned Y     = 0,
  parameter int unsigned W     = DNOC_W,
  parameter int unsigned DEPTH = 64
) (
  input  logic                   clk,
  input  logic                   rst,
  // dNoC links
  input  logic [NDIR-1:0]        dn_i_vld,
  input  logic [NDIR-1:0][W-1:0] dn_i_dat,
  output logic [NDIR-1:0]        dn_o_vld,
  output logic [NDIR-1:0][W-1:0] dn_o_dat,
  output logic [NDIR-1:0]        dn_oe,
  // iNoC buses
  input  imsg_t                  v_i,
  output imsg_t                  v_o,
  input  imsg_t                  h_from_w,
  output imsg_t                  h_to_w,
  input  imsg_t                  h_from_e,
  output imsg_t                  h_to_e,
  // status
  output logic                   vsplit_closed,
  output logic                   hsplit_closed,
  output logic                   mf_busy,
  output logic                   cf_busy
);

  localparam int unsigned AW = $clog2(DEPTH);

  // ------------------------------------------------------------ iNoC
  imsg_t z_msg, sw_from_w, sw_to_w;
  logic  vs_tog, hs_tog;
  imsg_t v_back_unused;

  splitter u_vsplit (
    .clk, .rst, .toggle(vs_tog), .closed(vsplit_closed),
    .a_i(v_i), .a_o(v_back_unused), .b_i(IMSG_IDLE), .b_o(v_o)
  );

  splitter u_hsplit (
    .clk, .rst, .toggle(hs_tog), .closed(hsplit_closed),
    .a_i(h_from_w), .a_o(h_to_w), .b_i(sw_to_w), .b_o(sw_from_w)
  );

  iswitch #(.X(X), .Y(Y)) u_isw (
    .clk, .rst,
    .v_i    (v_i),
    .row_o  (),
    .from_w (sw_from_w),
    .from_e (h_from_e),
    .to_e   (h_to_e),
    .to_w   (sw_to_w),
    .z_o    (z_msg)
  );

  logic       mf_addr_we, mf_start, mf_dly_we, mf_stop;
  mfsm_addr_t mf_addr;
  mfsm_loop_t mf_loop;
  delays_t    mf_dly;
  logic       cf_slot_we, cf_start, cf_stop;
  cfsm_slot_t cf_slot;
  cfsm_loop_t cf_loop;

  zfsm u_zfsm (
    .z_i(z_msg),
    .vsplit_toggle(vs_tog), .hsplit_toggle(hs_tog),
    .mf_addr_we, .mf_addr, .mf_start, .mf_loop, .mf_dly_we, .mf_dly, .mf_stop,
    .cf_slot_we, .cf_slot, .cf_start, .cf_loop, .cf_stop
  );

  // ------------------------------------------------------------ dNoC
  dswitch_cfg_t sw_cfg;
  logic [NDIR-1:0]        sw_i_vld, sw_o_vld, sw_oe;
  logic [NDIR-1:0][W-1:0] sw_i_dat, sw_o_dat;
  logic                   mfo_vld;
  logic [W-1:0]           mfo_dat;

  cfsm u_cfsm (
    .clk, .rst,
    .slot_we(cf_slot_we), .slot_wr(cf_slot),
    .start(cf_start), .loop_cfg(cf_loop), .stop(cf_stop),
    .sw_cfg, .busy(cf_busy)
  );

  always_comb begin
    sw_i_vld        = dn_i_vld;
    sw_i_dat        = dn_i_dat;
    sw_i_vld[DIR_M] = mfo_vld;
    sw_i_dat[DIR_M] = mfo_dat;
    dn_o_vld        = sw_o_vld;
    dn_o_dat        = sw_o_dat;
    dn_oe           = sw_oe;
    dn_o_vld[DIR_M] = 1'b0;
    dn_o_dat[DIR_M] = '0;
    dn_oe[DIR_M]    = 1'b0;
  end

  dswitch #(.W(W)) u_dsw (
    .clk, .rst, .cfg(sw_cfg),
    .in_vld(sw_i_vld), .in_dat(sw_i_dat),
    .out_vld(sw_o_vld), .out_dat(sw_o_dat), .out_oe(sw_oe)
  );

  // ------------------------------------------------------- memory bank
  logic          mb_en, mb_we;
  logic [AW-1:0] mb_addr;
  logic [W-1:0]  mb_wdata, mb_rdata;

  mfsm #(.W(W), .AW(AW)) u_mfsm (
    .clk, .rst,
    .cfg_addr_we(mf_addr_we), .cfg_addr(mf_addr),
    .start(mf_start), .cfg_loop(mf_loop),
    .dly_we(mf_dly_we), .cfg_dly(mf_dly),
    .stop(mf_stop), .busy(mf_busy),
    .mb_en, .mb_we, .mb_addr, .mb_wdata, .mb_rdata,
    .dn_o_vld(mfo_vld), .dn_o_dat(mfo_dat),
    .dn_i_vld(sw_o_vld[DIR_M]), .dn_i_dat(sw_o_dat[DIR_M])
  );

  mbank #(.W(W), .DEPTH(DEPTH)) u_mbank (
    .clk, .en(mb_en), .we(mb_we), .addr(mb_addr),
    .wdata(mb_wdata), .rdata(mb_rdata)
  );

endmodule
