// iswitch: node of the instruction network (iNoC) in tile (X,Y).
//
// The iNoC is a hybrid of bus and packet network. A sequencer puts a
// message on the vertical bus of its column; it is broadcast in one cycle
// along the part of the column joined by closed splitters. Every iSwitch on
// that part checks whether the message's row is its own; the one that
// matches rebroadcasts it, in the next cycle, on its horizontal bus, which
// again reaches every iSwitch joined by closed splitters. The iSwitch whose
// coordinates match hands the message to its zFSM. Any reachable tile is
// thus reached in two cycles. This is the scheme the document describes.
//
// Own choices: the row match and the tile match are each registered
// (one pipeline stage per broadcast); the horizontal bus is carried as two
// one-way chains, eastward and westward, each node inserting its own
// message; the compiler must keep two messages off one horizontal segment
// in the same cycle (checked by an assertion), and if it does not, the
// node's own message wins over one from the west, which wins over one from
// the east.
//
// Interface: v_i is the vertical bus at this row. row_o is the message
// picked for this row (the horizontal broadcast source). from_w / from_e
// arrive from the west / east neighbour through the splitters; to_e / to_w
// leave toward them. z_o is the message for this tile's zFSM.
// Timing: message on v_i in cycle t -> row_o in t+1 -> z_o in t+2.
module iswitch
  import dimarch_pkg::*;
#(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0
) (
  input  logic  clk,
  input  logic  rst,
  input  imsg_t v_i,
  output imsg_t row_o,
  input  imsg_t from_w,
  input  imsg_t from_e,
  output imsg_t to_e,
  output imsg_t to_w,
  output imsg_t z_o
);

  imsg_t h_msg;

  // stage 1: row identification on the vertical broadcast
  always_ff @(posedge clk) begin
    if (rst)                                       row_o <= '0;
    else if (v_i.vld && v_i.y == XY_W'(Y))         row_o <= v_i;
    else                                           row_o <= '0;
  end

  // horizontal broadcast: own message travels both ways, others pass on
  assign to_e = row_o.vld ? row_o : from_w;
  assign to_w = row_o.vld ? row_o : from_e;

  always_comb begin
    if (row_o.vld)       h_msg = row_o;
    else if (from_w.vld) h_msg = from_w;
    else                 h_msg = from_e;
  end

  // stage 2: tile identification on the horizontal broadcast
  always_ff @(posedge clk) begin
    if (rst)                                                  z_o <= '0;
    else if (h_msg.vld && h_msg.x == XY_W'(X) && h_msg.y == XY_W'(Y)) z_o <= h_msg;
    else                                                      z_o <= '0;
  end

  // the compiler keeps one message per horizontal segment and cycle
  a_one_msg : assert property (@(posedge clk) disable iff (rst)
                               $onehot0({row_o.vld, from_w.vld, from_e.vld}))
    else $error("iswitch(%0d,%0d): two messages on one horizontal segment", X, Y);

endmodule
