// dimarch: the distributed, partitionable memory system that sits beside
// a coarse-grain reconfigurable fabric. A COLS x ROWS grid of memory tiles
// (mBank + mFSM + dSwitch + cFSM + iSwitch + zFSM + splitters) is joined by
// two networks:
//
//   dNoC : a circuit-switched, half-duplex mesh of 256-bit links between
//          the dSwitches. Row 0 faces the register files: the South port of
//          tile (x,0) is the register-file/memory interface (RFMI) of column
//          x. Each hop is pipelined or bypassed (single cycle multi-hop) per
//          dSwitch cell, as its cFSM programs it.
//   iNoC : per column a vertical bus driven by the sequencer of that column,
//          per row a horizontal bus; both are cut into segments by splitters
//          that are all open after reset. Sequencers close splitters with
//          messages to build private partitions (a sequencer plus the tiles
//          it can reach) and then program mFSMs and cFSMs inside them.
//
// A memory partition plus the computation it serves forms a private
// execution environment; since there are no memory locks, the compiler is
// responsible for keeping partitions and streams free of conflicts, which
// the assertions below check for the links.
//
// The structure, the networks and the per-tile parts follow the document;
// the default 3 x 3 grid is the size of its partitioning and pipelining
// examples. Coordinates: x grows eastward, y grows away from the register
// files (this design's reading of the figures).
//
// Interface: seq_i[x] is the instruction message from sequencer x (one per
// cycle, vld high). rf_i_* is what register file x drives into the dNoC,
// rf_o_* / rf_oe what the dNoC drives toward it. The status arrays expose
// splitter states and controller activity.
//
// Circuit note: a mesh whose hops can each be bypassed is structurally
// cyclic (a combinational ring through four bypassed dSwitches). Because a
// cell drives its link only in output mode and passes its input only in
// input mode, a ring can only close if the cFSMs are programmed with a
// loop of output-mode bypass cells, which a valid schedule never contains.
// Tools may still report the structural loop; it is inherent to the
// programmable-pipelining scheme. Lint also reports v_in, h_fw and h_fe as
// circular: each is one array holding the buses of all tiles, and a tile's
// output feeds its neighbour's input in the same array. Element by element
// the vertical bus runs only toward higher rows and each horizontal chain
// only one way, so no real loop exists.
module dimarch
  import dimarch_pkg::*;
#(
  parameter int unsigned COLS  = 3,
  parameter int unsigned ROWS  = 3,
  parameter int unsigned W     = DNOC_W,
  parameter int unsigned DEPTH = 64
) (
  input  logic                  clk,
  input  logic                  rst,
  // sequencers
  input  imsg_t                 seq_i        [COLS],
  // register-file / memory interfaces (RFMI)
  input  logic [COLS-1:0]       rf_i_vld,
  input  logic [W-1:0]          rf_i_dat     [COLS],
  output logic [COLS-1:0]       rf_o_vld,
  output logic [W-1:0]          rf_o_dat     [COLS],
  output logic [COLS-1:0]       rf_oe,
  // status
  output logic [COLS-1:0]       vsplit_closed[ROWS],
  output logic [COLS-1:0]       hsplit_closed[ROWS],
  output logic [COLS-1:0]       mf_busy      [ROWS],
  output logic [COLS-1:0]       cf_busy      [ROWS]
);

  logic [NDIR-1:0]        i_vld [ROWS][COLS];
  logic [NDIR-1:0][W-1:0] i_dat [ROWS][COLS];
  logic [NDIR-1:0]        o_vld [ROWS][COLS];
  logic [NDIR-1:0][W-1:0] o_dat [ROWS][COLS];
  logic [NDIR-1:0]        o_oe  [ROWS][COLS];

  imsg_t v_in  [ROWS][COLS];
  imsg_t v_out [ROWS][COLS];
  imsg_t h_fw  [ROWS][COLS];   // from west, before this tile's splitter
  imsg_t h_tw  [ROWS][COLS];
  imsg_t h_fe  [ROWS][COLS];
  imsg_t h_te  [ROWS][COLS];

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col

      // ---------------- dNoC links
      always_comb begin
        i_vld[y][x] = '0;
        i_dat[y][x] = '0;
        if (y == 0) begin
          i_vld[y][x][DIR_S] = rf_i_vld[x];
          i_dat[y][x][DIR_S] = rf_i_dat[x];
        end else begin
          i_vld[y][x][DIR_S] = o_vld[y-1][x][DIR_N];
          i_dat[y][x][DIR_S] = o_dat[y-1][x][DIR_N];
        end
        if (y < ROWS-1) begin
          i_vld[y][x][DIR_N] = o_vld[y+1][x][DIR_S];
          i_dat[y][x][DIR_N] = o_dat[y+1][x][DIR_S];
        end
        if (x > 0) begin
          i_vld[y][x][DIR_W] = o_vld[y][x-1][DIR_E];
          i_dat[y][x][DIR_W] = o_dat[y][x-1][DIR_E];
        end
        if (x < COLS-1) begin
          i_vld[y][x][DIR_E] = o_vld[y][x+1][DIR_W];
          i_dat[y][x][DIR_E] = o_dat[y][x+1][DIR_W];
        end
      end

      // ---------------- iNoC buses
      if (y == 0) begin : g_seq
        assign v_in[y][x] = seq_i[x];
      end else begin : g_vchain
        assign v_in[y][x] = v_out[y-1][x];
      end
      if (x == 0) begin : g_wedge
        assign h_fw[y][x] = IMSG_IDLE;
      end else begin : g_wlink
        assign h_fw[y][x] = h_te[y][x-1];
      end
      if (x == COLS-1) begin : g_eedge
        assign h_fe[y][x] = IMSG_IDLE;
      end else begin : g_elink
        assign h_fe[y][x] = h_tw[y][x+1];
      end

      mtile #(.X(x), .Y(y), .W(W), .DEPTH(DEPTH)) u_tile (
        .clk, .rst,
        .dn_i_vld (i_vld[y][x]),
        .dn_i_dat (i_dat[y][x]),
        .dn_o_vld (o_vld[y][x]),
        .dn_o_dat (o_dat[y][x]),
        .dn_oe    (o_oe[y][x]),
        .v_i      (v_in[y][x]),
        .v_o      (v_out[y][x]),
        .h_from_w (h_fw[y][x]),
        .h_to_w   (h_tw[y][x]),
        .h_from_e (h_fe[y][x]),
        .h_to_e   (h_te[y][x]),
        .vsplit_closed (vsplit_closed[y][x]),
        .hsplit_closed (hsplit_closed[y][x]),
        .mf_busy       (mf_busy[y][x]),
        .cf_busy       (cf_busy[y][x])
      );

      // half-duplex links: never driven from both ends at once
      if (x < COLS-1) begin : g_chk_e
        a_half_duplex_ew : assert property (@(posedge clk) disable iff (rst)
          !(o_oe[y][x][DIR_E] && o_oe[y][x+1][DIR_W]))
          else $error("dNoC link (%0d,%0d)-(%0d,%0d) driven from both ends", x, y, x+1, y);
      end
      if (y < ROWS-1) begin : g_chk_n
        a_half_duplex_ns : assert property (@(posedge clk) disable iff (rst)
          !(o_oe[y][x][DIR_N] && o_oe[y+1][x][DIR_S]))
          else $error("dNoC link (%0d,%0d)-(%0d,%0d) driven from both ends", x, y, x, y+1);
      end
    end

    for (genvar x = 0; x < COLS; x++) begin : g_rfmi
      if (y == 0) begin : g_out
        assign rf_o_vld[x] = o_vld[0][x][DIR_S];
        assign rf_o_dat[x] = o_dat[0][x][DIR_S];
        assign rf_oe[x]    = o_oe[0][x][DIR_S];
      end
    end
  end

endmodule
