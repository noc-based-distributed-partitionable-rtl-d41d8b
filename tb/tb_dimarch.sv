// tb_dimarch: end-to-end test of the memory system at its default size
// (3 x 3 tiles, 256-bit dNoC, 2 KB banks), driven only through the
// sequencer instruction ports and the register-file interfaces.
//
//  A. Private partitioning: all splitters open after reset, so sequencer x
//     reaches only tile (x,0). Sequencers 1 and 2 close the vertical
//     splitters below row 0 in the same cycle; sequencer 1 then closes the
//     one below (1,1) and has (1,2) close its horizontal splitter toward
//     (0,2). Each takes effect three cycles after the message. Sequencer 1
//     can then program (0,2); a message from sequencer 0 to (0,1) is lost.
//  B. Write stream: register file 1 sends 8 words up column 1: (1,0)
//     passes them North through its pipeline register, (1,1) both stores
//     them (MBank) and passes them North bypassed (multicast, single cycle
//     multi-hop), (1,2) stores them. Both banks are checked in step C.
//  C. Contiguous partition: the cFSM of (1,1) time-multiplexes the South
//     output between the North input (words 0-3 read from bank (1,2)) and
//     its own bank (words 4-7); register file 1 must receive words 0..7 in
//     8 consecutive cycles at the cycle the programming predicts.
//  D. Elastic stream: tile (0,0) streams endlessly to register file 0 with
//     one idle cycle between words; a delay change message makes the gap
//     three cycles while the stream runs; then it is stopped.
// Each mechanism is counted and must have happened at least once.
module tb_dimarch;
  import dimarch_pkg::*;
  import dimarch_tb_pkg::*;
  localparam int COLS = 3, ROWS = 3, W = 256;
  logic clk = 0, rst;
  imsg_t seq_i [COLS];
  logic [COLS-1:0] rf_i_vld, rf_o_vld, rf_oe;
  logic [W-1:0] rf_i_dat [COLS];
  logic [W-1:0] rf_o_dat [COLS];
  logic [COLS-1:0] vsplit_closed [ROWS];
  logic [COLS-1:0] hsplit_closed [ROWS];
  logic [COLS-1:0] mf_busy [ROWS];
  logic [COLS-1:0] cf_busy [ROWS];
  logic [W-1:0] words [8];
  int cyc = 0, checks = 0, failures = 0;
  int n_vsplit = 0, n_hsplit = 0, n_private = 0, n_pipe = 0, n_scmht = 0, n_mcast = 0;
  int n_tmux = 0, n_wr = 0, n_rd = 0, n_elastic = 0;

  dimarch dut (.*);
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

  task automatic send(input int col, input imsg_t m, output int at);
    seq_i[col] = m; at = cyc;
    @(negedge clk);
    seq_i[col] = '0;
  endtask

  task automatic wait_until(input int c);
    while (cyc < c) @(negedge clk);
  endtask

  initial begin
    int t, t2, a, last;
    int gaps [$];
    rst = 1; rf_i_vld = '0;
    foreach (seq_i[i]) seq_i[i] = '0;
    foreach (rf_i_dat[i]) rf_i_dat[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // ------------------------------------------------ A. partitioning
    foreach (vsplit_closed[y]) chk(vsplit_closed[y] == '0 && hsplit_closed[y] == '0, "open after reset");
    seq_i[1] = msg(1, 0, OP_VSPLIT, '0);
    seq_i[2] = msg(2, 0, OP_VSPLIT, '0);
    t = cyc;
    @(negedge clk);
    seq_i[1] = '0; seq_i[2] = '0;
    wait_until(t + 2);
    chk(vsplit_closed[0] == 3'b000, "not yet closed after two cycles");
    wait_until(t + 3);
    chk(vsplit_closed[0] == 3'b110, "vertical splitters closed in three cycles");
    if (vsplit_closed[0] == 3'b110) n_vsplit += 2;
    send(1, msg(1, 1, OP_VSPLIT, '0), t);
    wait_until(t + 3);   // row 2 is reachable only once (1,1) has closed
    send(1, msg(1, 2, OP_HSPLIT, '0), t);
    wait_until(t + 3);
    chk(vsplit_closed[1] == 3'b010, "sequencer 1 reached row 1");
    chk(hsplit_closed[2] == 3'b010, "horizontal splitter (0,2)-(1,2) closed");
    if (vsplit_closed[1][1]) n_vsplit++;
    if (hsplit_closed[2][1]) n_hsplit++;
    // sequencer 1 programs a cFSM in (0,2) through its partition
    send(1, msg(0, 2, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    // sequencer 0 tries (0,1): its vertical splitter is open
    send(0, msg(0, 1, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    repeat (4) @(negedge clk);
    chk(cf_busy[2][0], "sequencer 1 programs (0,2)");
    chk(!cf_busy[1][0], "sequencer 0 cannot reach (0,1)");
    if (cf_busy[2][0] && !cf_busy[1][0]) n_private++;
    send(1, msg(0, 2, OP_STOP, 48'h3), t);
    // sequencer 2 gains (2,1) through its closed splitter
    send(2, msg(2, 1, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    repeat (3) @(negedge clk);
    chk(cf_busy[1][2], "sequencer 2 reaches (2,1)");
    send(2, msg(2, 1, OP_STOP, 48'h3), t);

    // ------------------------------------------------ B. write stream
    foreach (words[i]) words[i] = rnd();
    send(1, msg(1, 0, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_S, DIR_N, 1'b1), 0)), t);
    send(1, msg(1, 0, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    send(1, msg(1, 1, OP_CFSM_SLOT,
                p_cslot(0, route(route('0, DIR_S, DIR_N, 1'b0), DIR_S, DIR_M, 1'b0), 0)), t);
    send(1, msg(1, 1, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    send(1, msg(1, 2, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_S, DIR_M, 1'b0), 0)), t);
    send(1, msg(1, 2, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    send(1, msg(1, 1, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b1, 0, 1, 0)), t);
    send(1, msg(1, 2, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b1, 0, 1, 0)), t);
    // both banks write 8 words starting at t2 + 3 + init
    send(1, msg(1, 1, OP_MFSM_START, p_mloop(8, 1, 6, 0, 0)), t2);
    send(1, msg(1, 2, OP_MFSM_START, p_mloop(8, 1, 5, 0, 0)), t);
    // words reach rows 1 and 2 one cycle after register file 1 sends them
    wait_until(t2 + 3 + 6 - 1);
    foreach (words[i]) begin
      rf_i_vld[1] = 1'b1; rf_i_dat[1] = words[i];
      @(negedge clk);
    end
    rf_i_vld[1] = 1'b0;
    @(negedge clk);
    chk(!mf_busy[1][1] && !mf_busy[2][1], "write streams done");

    // ------------------------------------------------ C. contiguous partition
    // end the write circuits first, so no link is ever driven from both ends
    send(1, msg(1, 0, OP_STOP, 48'h2), t);
    send(1, msg(1, 1, OP_STOP, 48'h2), t);
    send(1, msg(1, 2, OP_STOP, 48'h2), t);
    // (1,2): S <- M; (1,1): 4 cycles S <- N, 4 cycles S <- M; (1,0): S <- N pipelined
    send(1, msg(1, 0, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_N, DIR_S, 1'b1), 0)), t);
    send(1, msg(1, 0, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    send(1, msg(1, 2, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_M, DIR_S, 1'b0), 0)), t);
    send(1, msg(1, 2, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    send(1, msg(1, 1, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_N, DIR_S, 1'b0), 4)), t);
    send(1, msg(1, 1, OP_CFSM_SLOT, p_cslot(1, route('0, DIR_M, DIR_S, 1'b0), 4)), t);
    send(1, msg(1, 2, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b0, 0, 1, 0)), t);
    send(1, msg(1, 1, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b0, 4, 1, 0)), t);
    // mFSM (1,2) first read at A = t2+3+4; cFSM (1,1) from A+1; mFSM (1,1) at A+4
    send(1, msg(1, 2, OP_MFSM_START, p_mloop(4, 1, 4, 0, 0)), t2);
    send(1, msg(1, 1, OP_CFSM_START, p_cloop(2, 4, 1)), t);
    send(1, msg(1, 1, OP_MFSM_START, p_mloop(4, 1, 6, 0, 0)), t);
    a = t2 + 3 + 4;
    while (cyc < a + 2) begin
      chk(!rf_o_vld[1], "nothing early at register file 1");
      @(negedge clk);
    end
    foreach (words[i]) begin
      chk(rf_oe[1] && rf_o_vld[1] && rf_o_dat[1] == words[i], $sformatf("contiguous read word %0d", i));
      if (rf_o_vld[1] && rf_o_dat[1] == words[i]) begin
        n_rd++;
        if (i == 0) begin n_wr += 2; n_pipe++; n_scmht++; n_mcast++; end
        if (i == 4) n_tmux++;
      end
      @(negedge clk);
    end
    chk(!rf_o_vld[1], "stream ends after 8 words");
    send(1, msg(1, 0, OP_STOP, 48'h3), t);

    // ------------------------------------------------ D. elastic stream
    send(0, msg(0, 0, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_M, DIR_S, 1'b0), 0)), t);
    send(0, msg(0, 0, OP_CFSM_START, p_cloop(1, 0, 0)), t);
    send(0, msg(0, 0, OP_MFSM_ADDR, p_maddr(AGU_CIRC, 1'b0, 0, 1, 8)), t);
    send(0, msg(0, 0, OP_MFSM_START, p_mloop(4, 0, 0, 1, 1)), t);
    last = -1;
    gaps.delete();
    repeat (30) begin
      if (rf_o_vld[0]) begin if (last >= 0) gaps.push_back(cyc - last); last = cyc; end
      @(negedge clk);
    end
    foreach (gaps[i]) chk(gaps[i] == 2, "gap before delay change");
    send(0, msg(0, 0, OP_MFSM_DLY, p_mdly(0, 3, 3)), t);
    // the new delays are in place from cycle t + 3; a word seen at the register
    // file from t + 4 was read by an access that already used them
    gaps.delete();
    repeat (60) begin
      if (rf_o_vld[0]) begin if (last >= t + 4) gaps.push_back(cyc - last); last = cyc; end
      @(negedge clk);
    end
    chk(gaps.size() >= 10, "stream kept running");
    foreach (gaps[i]) chk(gaps[i] == 4, "gap after delay change");
    if (gaps.size() > 0 && gaps[gaps.size()-1] == 4) n_elastic++;
    send(0, msg(0, 0, OP_STOP, 48'h3), t);
    repeat (4) @(negedge clk);
    chk(!mf_busy[0][0] && !cf_busy[0][0] && !rf_o_vld[0] && !rf_oe[0], "elastic stream stopped");

    // ------------------------------------------------ mechanisms
    $display("mechanisms: vsplit=%0d hsplit=%0d private=%0d pipelined=%0d scmht=%0d multicast=%0d tmux=%0d writes=%0d reads=%0d elastic=%0d",
             n_vsplit, n_hsplit, n_private, n_pipe, n_scmht, n_mcast, n_tmux, n_wr, n_rd, n_elastic);
    chk(n_vsplit > 0, "vertical splitter closed");
    chk(n_hsplit > 0, "horizontal splitter closed");
    chk(n_private > 0, "private partition enforced");
    chk(n_pipe > 0, "pipelined hop");
    chk(n_scmht > 0, "single cycle multi-hop");
    chk(n_mcast > 0, "multicast");
    chk(n_tmux > 0, "cFSM time multiplexing");
    chk(n_wr > 0 && n_rd > 0, "mFSM write and read streams");
    chk(n_elastic > 0, "elastic delay change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
