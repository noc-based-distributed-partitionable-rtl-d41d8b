// tb_mm_store: memory-side part of the matrix multiplication workload
// ([64,1] x [1,64] -> [64,64]). The 4096 16-bit products, 256 words of
// 256 bit, are stored from three register files in parallel, each into its
// own two-bank partition, and read back. This runs the full system at its
// default size with three private partitions programmed at the same time:
//  - each sequencer closes the vertical splitter below its row-0 tile;
//  - the cFSM of (x,0) first sends the stream to its own bank (64 words),
//    then North to bank (x,1) (32 words): one contiguous 96-word region;
//  - the same schedule reversed reads the region back.
// 3 x 96 = 288 words hold the 256 result words (the rest is padding).
// Checks: every word is read back in order, one per cycle, at the
// predicted cycle, in all three columns at once.
module tb_mm_store;
  import dimarch_pkg::*;
  import dimarch_tb_pkg::*;
  localparam int COLS = 3, ROWS = 3, W = 256, N0 = 64, N1 = 32, N = N0 + N1;
  logic clk = 0, rst;
  imsg_t seq_i [COLS];
  logic [COLS-1:0] rf_i_vld, rf_o_vld, rf_oe;
  logic [W-1:0] rf_i_dat [COLS];
  logic [W-1:0] rf_o_dat [COLS];
  logic [COLS-1:0] vsplit_closed [ROWS];
  logic [COLS-1:0] hsplit_closed [ROWS];
  logic [COLS-1:0] mf_busy [ROWS];
  logic [COLS-1:0] cf_busy [ROWS];
  logic [W-1:0] words [COLS][N];
  int cyc = 0, checks = 0, failures = 0;

  dimarch dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // 16 products of a[r] * b[c] per word, row-major over the 64 x 64 result
  function automatic logic [W-1:0] product_word(input int col, input int i);
    logic [W-1:0] v;
    int k = col * N + i;             // global word index
    for (int j = 0; j < 16; j++) begin
      int e = k * 16 + j;            // element index
      int r = (e / 64) % 64, c = e % 64;
      v[j*16 +: 16] = (k < 256) ? 16'((r + 1) * (c + 3)) : 16'hffff;
    end
    return v;
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // the same message (with its column as x) from every sequencer at once
  task automatic send_all(input int y, input op_e op, input logic [PAY_W-1:0] pay, output int at);
    for (int x = 0; x < COLS; x++) seq_i[x] = msg(x, y, op, pay);
    at = cyc;
    @(negedge clk);
    foreach (seq_i[x]) seq_i[x] = '0;
  endtask

  initial begin
    int t, t0, s, r;
    rst = 1; rf_i_vld = '0;
    foreach (seq_i[i]) seq_i[i] = '0;
    foreach (rf_i_dat[i]) rf_i_dat[i] = '0;
    for (int x = 0; x < COLS; x++) for (int i = 0; i < N; i++) words[x][i] = product_word(x, i);
    repeat (3) @(negedge clk);
    rst = 0;
    send_all(0, OP_VSPLIT, '0, t);
    while (cyc < t + 3) @(negedge clk);
    chk(vsplit_closed[0] == '1, "three partitions opened in parallel");
    // ---------------- store
    send_all(0, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_S, DIR_M, 1'b0), N0), t);
    send_all(0, OP_CFSM_SLOT, p_cslot(1, route('0, DIR_S, DIR_N, 1'b0), N1), t);
    send_all(1, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_S, DIR_M, 1'b0), 0), t);
    send_all(1, OP_CFSM_START, p_cloop(1, 0, 0), t);
    send_all(0, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b1, 0, 1, 0), t);
    send_all(1, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b1, 0, 1, 0), t);
    send_all(0, OP_MFSM_START, p_mloop(N0, 1, 2, 0, 0), t0);   // first write at t0+5
    send_all(0, OP_CFSM_START, p_cloop(2, 1, 1), t);           // slot 0 from t0+5
    send_all(1, OP_MFSM_START, p_mloop(N1, 1, 64, 0, 0), t);   // first write at t0+69
    s = t0 + 5;
    while (cyc < s) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      for (int x = 0; x < COLS; x++) begin rf_i_vld[x] = 1'b1; rf_i_dat[x] = words[x][i]; end
      @(negedge clk);
    end
    rf_i_vld = '0;
    @(negedge clk);
    chk(mf_busy[0] == '0 && mf_busy[1] == '0 && cf_busy[0] == '0, "store finished");
    send_all(1, OP_STOP, 48'h2, t);
    // ---------------- load back
    send_all(0, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_M, DIR_S, 1'b0), N0), t);
    send_all(0, OP_CFSM_SLOT, p_cslot(1, route('0, DIR_N, DIR_S, 1'b0), N1), t);
    send_all(1, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_M, DIR_S, 1'b0), 0), t);
    send_all(1, OP_CFSM_START, p_cloop(1, 0, 0), t);
    send_all(0, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b0, 0, 1, 0), t);
    send_all(1, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b0, 0, 1, 0), t);
    send_all(0, OP_MFSM_START, p_mloop(N0, 1, 2, 0, 0), t0);   // first read at t0+5
    send_all(0, OP_CFSM_START, p_cloop(2, 2, 1), t);           // slot 0 from t0+6
    send_all(1, OP_MFSM_START, p_mloop(N1, 1, 64, 0, 0), t);   // first read at t0+69
    r = t0 + 5;
    while (cyc < r + 1) begin chk(rf_o_vld == '0, "nothing early"); @(negedge clk); end
    for (int i = 0; i < N; i++) begin
      for (int x = 0; x < COLS; x++)
        chk(rf_o_vld[x] && rf_o_dat[x] == words[x][i], $sformatf("column %0d word %0d", x, i));
      @(negedge clk);
    end
    chk(rf_o_vld == '0, "load ends");
    $display("stored and reloaded %0d words per column, %0d cycles each way", N, N);
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
