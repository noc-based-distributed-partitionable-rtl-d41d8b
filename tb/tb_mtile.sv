// tb_mtile: self-checking test of one memory tile at (X,Y) = (1,0),
// programmed only through its instruction buses.
//  1. Splitters: both open after reset (nothing leaves on v_o or h_to_w);
//     a toggle message closes each one exactly three cycles after the
//     message was put on the vertical bus; the buses then pass messages.
//  2. Write stream: the cFSM routes South -> MBank (bypassed), the mFSM
//     writes 8 words arriving on the South port into the bank; the words
//     are driven only in the cycles the programming latency predicts.
//  3. Read stream: the cFSM routes MBank -> South through the pipeline
//     register, the mFSM reads the words back; each must appear on the
//     South port at its predicted cycle (message + 3 + 1 + 1).
//  4. A stop message returns the cFSM to its idle (all-input) state.
module tb_mtile;
  import dimarch_pkg::*;
  import dimarch_tb_pkg::*;
  localparam int W = 256, X = 1, Y = 0;
  logic clk = 0, rst;
  logic [NDIR-1:0] dn_i_vld, dn_o_vld, dn_oe;
  logic [NDIR-1:0][W-1:0] dn_i_dat, dn_o_dat;
  imsg_t v_i, v_o, h_from_w, h_to_w, h_from_e, h_to_e;
  logic vsplit_closed, hsplit_closed, mf_busy, cf_busy;
  logic [W-1:0] words [8];
  int cyc = 0, checks = 0, failures = 0;

  mtile #(.X(X), .Y(Y)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W/32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // put one message on the vertical bus for one cycle; returns its cycle
  task automatic send(input imsg_t m, output int at);
    v_i = m; at = cyc;
    @(negedge clk);
    v_i = '0;
  endtask

  initial begin
    int t;
    imsg_t probe;
    rst = 1; dn_i_vld = '0; dn_i_dat = '0; v_i = '0; h_from_w = '0; h_from_e = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // ---- 1. splitters
    chk(!vsplit_closed && !hsplit_closed, "splitters open after reset");
    probe = msg(0, 0, OP_NOP, 48'h1234);
    v_i = msg(X, 1, OP_NOP, '0); #1;
    chk(v_o == '0, "open vertical splitter blocks");
    @(negedge clk); v_i = '0;
    send(msg(X, Y, OP_VSPLIT, '0), t);
    while (cyc < t + 3) begin chk(!vsplit_closed, "vsplit not yet closed"); @(negedge clk); end
    chk(vsplit_closed, "vsplit closed after three cycles");
    v_i = msg(X, 1, OP_NOP, 48'hbeef); #1;
    chk(v_o == v_i, "closed vertical splitter passes");
    @(negedge clk); v_i = '0;
    send(probe, t);           // for (0,0): broadcast westward, blocked
    #1 chk(h_to_w == '0 && h_to_e == probe, "open horizontal splitter blocks west only");
    @(negedge clk);
    send(msg(X, Y, OP_HSPLIT, '0), t);
    while (cyc < t + 3) @(negedge clk);
    chk(hsplit_closed, "hsplit closed after three cycles");
    send(probe, t);
    #1 chk(h_to_w == probe, "closed horizontal splitter passes");
    @(negedge clk);
    h_from_w = msg(X, Y, OP_VSPLIT, '0);  // from the west neighbour, through the splitter
    @(negedge clk); h_from_w = '0;
    repeat (2) @(negedge clk);
    chk(!vsplit_closed, "message from west neighbour reached the zFSM");
    // ---- 2. write stream South -> MBank
    foreach (words[i]) words[i] = rnd();
    send(msg(X, Y, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_S, DIR_M, 1'b0), 0)), t);
    send(msg(X, Y, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    send(msg(X, Y, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b1, 8, 1, 0)), t);
    send(msg(X, Y, OP_MFSM_START, p_mloop(8, 1, 2, 0, 0)), t);
    // start message at t -> first access at t + 3 + init_dly
    while (cyc < t + 5) @(negedge clk);
    foreach (words[i]) begin
      dn_i_vld[DIR_S] = 1; dn_i_dat[DIR_S] = words[i];
      @(negedge clk);
    end
    dn_i_vld = '0;
    chk(!mf_busy, "write stream finished");
    // ---- 3. read stream MBank -> South, pipelined
    send(msg(X, Y, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_M, DIR_S, 1'b1), 0)), t);
    send(msg(X, Y, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    send(msg(X, Y, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b0, 8, 1, 0)), t);
    send(msg(X, Y, OP_MFSM_START, p_mloop(8, 1, 0, 0, 0)), t);
    while (cyc < t + 5) begin
      chk(!dn_o_vld[DIR_S], "nothing early on South");
      @(negedge clk);
    end
    foreach (words[i]) begin
      chk(dn_oe[DIR_S] && dn_o_vld[DIR_S] && dn_o_dat[DIR_S] == words[i], $sformatf("read word %0d", i));
      @(negedge clk);
    end
    chk(!dn_o_vld[DIR_S], "stream ends");
    // ---- 4. stop the cFSM
    send(msg(X, Y, OP_STOP, 48'h2), t);
    repeat (3) @(negedge clk);
    chk(!cf_busy && dn_oe == '0, "cFSM stopped, no link driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
