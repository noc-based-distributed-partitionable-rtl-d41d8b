// tb_cfsm: self-checking test of the dSwitch configuration controller.
// Programs random slot tables and schedules (slot count, hold times,
// initial delay, rounds) and compares the configuration applied in every
// cycle with an independently built expected timeline; also checks the
// idle configuration, the endless schedule and stop.
module tb_cfsm;
  import dimarch_pkg::*;
  logic clk = 0, rst, slot_we, start, stop, busy;
  cfsm_slot_t slot_wr;
  cfsm_loop_t loop_cfg;
  dswitch_cfg_t sw_cfg;
  dswitch_cfg_t tcfg [CF_SLOTS];
  logic [DLY_W-1:0] thold [CF_SLOTS];
  dswitch_cfg_t timeline [$];
  int checks = 0, failures = 0;

  cfsm dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    rst = 1; slot_we = 0; start = 0; stop = 0; slot_wr = '0; loop_cfg = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    chk(sw_cfg == '0 && !busy, "idle after reset");
    for (int t = 0; t < 20; t++) begin
      int ns, init, it;
      for (int s = 0; s < CF_SLOTS; s++) begin
        tcfg[s] = dswitch_cfg_t'($urandom);
        thold[s] = DLY_W'($urandom_range(0, 4));
        slot_we = 1; slot_wr = '{slot: CF_SLOT_W'(s), cfg: tcfg[s], hold: thold[s]};
        @(negedge clk);
      end
      slot_we = 0;
      ns = $urandom_range(1, CF_SLOTS); init = $urandom_range(0, 3); it = $urandom_range(1, 3);
      // expected timeline from the cycle after the start edge
      timeline.delete();
      for (int i = 0; i < init; i++) timeline.push_back('0);
      for (int r = 0; r < it; r++)
        for (int s = 0; s < ns; s++)
          for (int h = 0; h < ((thold[s] == 0) ? 1 : int'(thold[s])); h++)
            timeline.push_back(tcfg[s]);
      timeline.push_back('0);
      timeline.push_back('0);
      start = 1; loop_cfg = '{nslots: (CF_SLOT_W+1)'(ns), init_dly: DLY_W'(init), iters: CNT_W'(it)};
      @(negedge clk);
      start = 0;
      foreach (timeline[i]) begin
        chk(sw_cfg == timeline[i], $sformatf("timeline step %0d", i));
        @(negedge clk);
      end
      chk(!busy, "done");
    end
    // endless static schedule, then stop
    slot_we = 1; slot_wr = '{slot: '0, cfg: dswitch_cfg_t'(20'h5a5a5), hold: '0};
    @(negedge clk);
    slot_we = 0;
    start = 1; loop_cfg = '{nslots: 1, init_dly: 0, iters: 0};
    @(negedge clk);
    start = 0;
    repeat (50) begin
      chk(sw_cfg == dswitch_cfg_t'(20'h5a5a5) && busy, "endless");
      @(negedge clk);
    end
    stop = 1;
    @(negedge clk);
    stop = 0;
    chk(sw_cfg == '0 && !busy, "stopped");
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
