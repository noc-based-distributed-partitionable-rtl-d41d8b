// tb_fft_reorder: memory-side part of the FFT workloads. Between FFT
// stages the data is reordered through a bank used as a scratch pad: the
// register file streams a block of samples into a bank in natural order
// and reads it back in bit-reversed order. This runs the full system at its
// default size for FFTs of 64, 128, 256 and 512 points (2 x 16-bit complex
// samples, 8 per 256-bit word, so 8 to 64 words: one 2 KB bank). Reordering
// is at word granularity; reordering the 8 samples inside a word is left
// to the register file. Checks: every word returns in bit-reversed word
// order, one word per cycle, at the cycle the programming predicts, and
// the transfer takes one cycle per word (plus fixed latency) each way.
module tb_fft_reorder;
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
  logic [W-1:0] words [64];
  int cyc = 0, checks = 0, failures = 0;

  dimarch dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W/32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic int bitrev(int i, int n);
    int r = 0;
    for (int b = 0; b < n; b++) if (i[b]) r |= 1 << (n - 1 - b);
    return r;
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic send(input imsg_t m, output int at);
    seq_i[0] = m; at = cyc;
    @(negedge clk);
    seq_i[0] = '0;
  endtask

  initial begin
    int t, nw, lg, t_first, t_last;
    rst = 1; rf_i_vld = '0;
    foreach (seq_i[i]) seq_i[i] = '0;
    foreach (rf_i_dat[i]) rf_i_dat[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int pts = 64; pts <= 512; pts *= 2) begin
      nw = pts / 8; lg = $clog2(nw);
      for (int i = 0; i < nw; i++) words[i] = rnd();
      // load: register file 0 -> bank (0,0), natural order
      send(msg(0, 0, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_S, DIR_M, 1'b0), 0)), t);
      send(msg(0, 0, OP_CFSM_START, p_cloop(1, 0, 0)), t);
      send(msg(0, 0, OP_MFSM_ADDR, p_maddr(AGU_LINEAR, 1'b1, 0, 1, 0)), t);
      send(msg(0, 0, OP_MFSM_START, p_mloop(nw, 1, 0, 0, 0)), t);
      while (cyc < t + 3) @(negedge clk);
      t_first = cyc;
      for (int i = 0; i < nw; i++) begin
        rf_i_vld[0] = 1'b1; rf_i_dat[0] = words[i];
        @(negedge clk);
      end
      rf_i_vld[0] = 1'b0;
      chk(!mf_busy[0][0], "load finished with the last word");
      send(msg(0, 0, OP_STOP, 48'h2), t);
      // store back: bank (0,0) -> register file 0, bit-reversed order
      send(msg(0, 0, OP_CFSM_SLOT, p_cslot(0, route('0, DIR_M, DIR_S, 1'b1), 0)), t);
      send(msg(0, 0, OP_CFSM_START, p_cloop(1, 0, 0)), t);
      send(msg(0, 0, OP_MFSM_ADDR, p_maddr(AGU_BITREV, 1'b0, 0, 0, lg)), t);
      send(msg(0, 0, OP_MFSM_START, p_mloop(nw, 1, 0, 0, 0)), t);
      // access at t+3, word leaves the mFSM at t+4, pipelined cell: t+5
      while (cyc < t + 5) begin chk(!rf_o_vld[0], "nothing early"); @(negedge clk); end
      for (int i = 0; i < nw; i++) begin
        chk(rf_o_vld[0] && rf_o_dat[0] == words[bitrev(i, lg)],
            $sformatf("%0d-point: word %0d in bit-reversed order", pts, i));
        t_last = cyc;
        @(negedge clk);
      end
      chk(!rf_o_vld[0], "store ends");
      chk(t_last - (t + 5) == nw - 1, "one word per cycle");
      $display("%0d-point FFT block: %0d words in, %0d words out, %0d cycles each way",
               pts, nw, nw, nw);
      send(msg(0, 0, OP_STOP, 48'h2), t);
      repeat (2) @(negedge clk);
    end
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
