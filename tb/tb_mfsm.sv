// tb_mfsm: self-checking test of the mBank controller / address generator.
// A behavioural single-port SRAM with one-cycle read latency stands in for
// the mBank. For vector (with stride), single, circular-buffer and
// bit-reversed programs, with random delays and loop counts, the test
// records every bank access and compares address, direction and the cycle
// it happens in with a list computed independently from the programming
// (initial delay once, intermittent delay between accesses, end delay
// between loops). Read data must leave on the dNoC port one cycle after
// the access; writes must store the dNoC word of their access cycle. A
// last program runs endless, has its delays changed while it runs
// (elastic stream) and is stopped.
module tb_mfsm;
  import dimarch_pkg::*;
  localparam int W = 256, AW = 6, DEPTH = 64;
  logic clk = 0, rst;
  logic cfg_addr_we, start, dly_we, stop, busy;
  mfsm_addr_t cfg_addr; mfsm_loop_t cfg_loop; delays_t cfg_dly;
  logic mb_en, mb_we; logic [AW-1:0] mb_addr; logic [W-1:0] mb_wdata, mb_rdata;
  logic dn_o_vld, dn_i_vld; logic [W-1:0] dn_o_dat, dn_i_dat;
  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] ref_mem [DEPTH];
  int cyc = 0;
  int checks = 0, failures = 0;
  // access log
  int acc_cyc [$]; int acc_addr [$]; logic acc_we [$];
  int exp_cyc [$]; int exp_addr [$];
  logic [W-1:0] last_rd; logic last_rd_pending; int last_rd_addr;

  mfsm #(.W(W), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  // behavioural SRAM
  always_ff @(posedge clk) if (mb_en) begin
    if (mb_we) mem[mb_addr] <= mb_wdata; else mb_rdata <= mem[mb_addr];
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W/32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // monitor (sampled mid-cycle)
  always @(negedge clk) if (!rst) begin
    if (last_rd_pending)
      chk(dn_o_vld && dn_o_dat == ref_mem[last_rd_addr], "read data one cycle after access");
    else
      chk(!dn_o_vld, "no read data without access");
    last_rd_pending = 0;
    if (mb_en) begin
      acc_cyc.push_back(cyc); acc_addr.push_back(int'(mb_addr)); acc_we.push_back(mb_we);
      if (mb_we) ref_mem[mb_addr] = dn_i_dat;
      else begin last_rd_pending = 1; last_rd_addr = int'(mb_addr); end
    end
  end
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int bitrev(int i, int n);
    int r = 0;
    for (int b = 0; b < n; b++) if (i[b]) r |= 1 << (n - 1 - b);
    return r;
  endfunction

  // run one finite program and compare
  task automatic run(input agu_mode_e mode, input logic wr, input int base, input int stride,
                     input int len, input int count, input int iters,
                     input int idly, input int mdly, input int edly);
    int c, p, a;
    @(negedge clk);
    cfg_addr_we = 1;
    cfg_addr = '{mode: mode, wr: wr, base: AW'(base), stride: AW'(stride), len: CNT_W'(len)};
    @(negedge clk);
    cfg_addr_we = 0;
    start = 1;
    cfg_loop = '{count: CNT_W'(count), iters: CNT_W'(iters),
                 dly: '{init_dly: DLY_W'(idly), mid_dly: DLY_W'(mdly), end_dly: DLY_W'(edly)}};
    acc_cyc.delete(); acc_addr.delete(); acc_we.delete();
    exp_cyc.delete(); exp_addr.delete();
    c = cyc + 1 + idly;
    p = 0;
    for (int it = 0; it < iters; it++) begin
      for (int i = 0; i < count; i++) begin
        case (mode)
          AGU_CIRC:   begin a = base + p; p = (p + stride) % len; end
          AGU_BITREV: a = base + bitrev(i, len);
          default:    a = base + i * stride;
        endcase
        exp_cyc.push_back(c); exp_addr.push_back(a % DEPTH);
        c += (i == count - 1) ? edly + 1 : mdly + 1;
      end
    end
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(acc_cyc.size() == exp_cyc.size(), $sformatf("access count %0d vs %0d", acc_cyc.size(), exp_cyc.size()));
    foreach (exp_cyc[i]) if (i < acc_cyc.size()) begin
      chk(acc_cyc[i] == exp_cyc[i], $sformatf("access %0d cycle %0d vs %0d", i, acc_cyc[i], exp_cyc[i]));
      chk(acc_addr[i] == exp_addr[i], $sformatf("access %0d addr %0d vs %0d", i, acc_addr[i], exp_addr[i]));
      chk(acc_we[i] == wr, "access direction");
    end
  endtask

  initial begin
    rst = 1; cfg_addr_we = 0; start = 0; dly_we = 0; stop = 0;
    cfg_addr = '0; cfg_loop = '0; cfg_dly = '0; dn_i_vld = 0; dn_i_dat = '0;
    last_rd_pending = 0;
    for (int a = 0; a < DEPTH; a++) begin mem[a] = rnd(); ref_mem[a] = mem[a]; end
    repeat (2) @(negedge clk);
    rst = 0;
    fork
      forever begin @(posedge clk); #1; dn_i_vld = 1; dn_i_dat = rnd(); end
    join_none
    // writes, then reads, in each addressing mode
    for (int t = 0; t < 24; t++) begin
      agu_mode_e m = agu_mode_e'(t % 3);
      int len = (m == AGU_BITREV) ? $urandom_range(1, 4) : $urandom_range(2, 12);
      int cnt = (m == AGU_BITREV) ? (1 << len) : $urandom_range(1, 10);
      int st  = (m == AGU_CIRC) ? $urandom_range(1, len - 1) : $urandom_range(0, 5);
      run(m, t[3], $urandom_range(0, 63), st, len, cnt, $urandom_range(1, 3),
          $urandom_range(0, 4), $urandom_range(0, 3), $urandom_range(0, 3));
    end
    // single access
    run(AGU_LINEAR, 1'b0, 17, 0, 0, 1, 1, 0, 0, 0);
    // final memory contents
    foreach (mem[a]) chk(mem[a] == ref_mem[a], "memory contents");
    // elastic endless stream: change delays on the fly, then stop
    begin
      int n0, g;
      @(negedge clk);
      cfg_addr_we = 1; cfg_addr = '{mode: AGU_LINEAR, wr: 0, base: 0, stride: 1, len: 0};
      @(negedge clk);
      cfg_addr_we = 0; start = 1;
      cfg_loop = '{count: 4, iters: 0, dly: '{init_dly: 0, mid_dly: 1, end_dly: 2}};
      acc_cyc.delete(); acc_addr.delete(); acc_we.delete();
      @(negedge clk);
      start = 0;
      repeat (40) @(negedge clk);
      chk(busy, "endless stream still running");
      dly_we = 1; cfg_dly = '{init_dly: 0, mid_dly: 3, end_dly: 0};
      @(negedge clk);
      dly_we = 0;
      n0 = acc_cyc.size();
      repeat (60) @(negedge clk);
      // after two settling accesses every gap is the new mid (4) or end (1)
      for (int i = n0 + 2; i < acc_cyc.size(); i++) begin
        g = acc_cyc[i] - acc_cyc[i-1];
        chk((acc_addr[i] == 0) ? (g == 1) : (g == 4), $sformatf("elastic gap %0d", g));
      end
      stop = 1;
      @(negedge clk);
      stop = 0;
      n0 = acc_cyc.size();
      repeat (10) @(negedge clk);
      chk(!busy && acc_cyc.size() == n0, "stopped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
