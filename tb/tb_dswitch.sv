// tb_dswitch: self-checking test of a five-direction dNoC node. Random
// node configurations and port inputs every cycle; a reference model
// derives each cell's internal line (input mode only), its IMUX choice
// among the other four directions, and the bypassed or registered output.
// A fixed pass (South in, North out pipelined, and South in, MBank out
// bypassed, at once) checks multicast and per-cell latency explicitly.
module tb_dswitch;
  import dimarch_pkg::*;
  localparam int W = 256;
  logic clk = 0, rst;
  dswitch_cfg_t cfg;
  logic [NDIR-1:0] in_vld, out_vld, out_oe;
  logic [NDIR-1:0][W-1:0] in_dat, out_dat;
  logic [NDIR-1:0] q_vld;
  logic [NDIR-1:0][W-1:0] q_dat;
  int checks = 0, failures = 0;

  dswitch #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W/32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // source direction of cell d for a given isel
  function automatic int src_of(int d, int isel);
    return (isel < d) ? isel : isel + 1;
  endfunction

  task automatic imux(input int d, output logic v, output logic [W-1:0] x);
    int s = src_of(d, cfg[d].isel);
    v = cfg[s].iosel ? 1'b0 : in_vld[s];
    x = cfg[s].iosel ? '0   : in_dat[s];
  endtask

  initial begin
    rst = 1; cfg = '0; in_vld = '0; in_dat = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    q_vld = '0;
    for (int n = 0; n < 500; n++) begin
      cfg = dswitch_cfg_t'($urandom);
      in_vld = NDIR'($urandom);
      for (int d = 0; d < NDIR; d++) in_dat[d] = rnd();
      #1;
      for (int d = 0; d < NDIR; d++) begin
        logic v; logic [W-1:0] x;
        imux(d, v, x);
        chk(out_oe[d] == cfg[d].iosel, "oe");
        if (cfg[d].iosel) begin
          logic ev; logic [W-1:0] ex;
          ev = cfg[d].psel ? q_vld[d] : v;
          ex = cfg[d].psel ? q_dat[d] : x;
          chk(out_vld[d] == ev && (!ev || out_dat[d] == ex), "output");
        end else begin
          chk(out_vld[d] == 1'b0, "quiet in input mode");
        end
      end
      @(posedge clk);
      for (int d = 0; d < NDIR; d++) imux(d, q_vld[d], q_dat[d]);
      @(negedge clk);
    end
    // directed: S -> N pipelined and S -> M bypassed (multicast)
    cfg = '0;
    cfg[DIR_N] = '{isel: 2'd1, psel: 1'b1, iosel: 1'b1}; // N: others M,S,W,E -> S = 1
    cfg[DIR_M] = '{isel: 2'd0, psel: 1'b0, iosel: 1'b1}; // M: others S,W,E,N -> S = 0
    for (int n = 0; n < 8; n++) begin
      logic [W-1:0] prev;
      prev = in_dat[DIR_S];
      in_vld = '0; in_vld[DIR_S] = 1'b1; in_dat[DIR_S] = rnd();
      #1;
      chk(out_vld[DIR_M] && out_dat[DIR_M] == in_dat[DIR_S], "bypass same cycle");
      if (n > 0) chk(out_vld[DIR_N] && out_dat[DIR_N] == prev, "pipelined one cycle later");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
