// tb_dcell: self-checking test of one dSwitch cell. Random configurations
// and inputs every cycle; checks the IMUX selection, the bypass path
// (same cycle), the pipelined path (one cycle later), the output enable
// and the input-mode internal line against a reference model.
module tb_dcell;
  import dimarch_pkg::*;
  localparam int W = 256;
  logic clk = 0, rst;
  dcell_cfg_t cfg;
  logic [3:0] others_vld;
  logic [3:0][W-1:0] others_dat;
  logic port_i_vld, port_o_vld, port_oe, line_vld;
  logic [W-1:0] port_i_dat, port_o_dat, line_dat;
  logic ref_vld_q;
  logic [W-1:0] ref_dat_q;
  int checks = 0, failures = 0, n_pipe = 0, n_byp = 0, n_in = 0;

  dcell #(.W(W)) dut (.*);
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

  initial begin
    rst = 1; cfg = '0; others_vld = '0; others_dat = '0;
    port_i_vld = 0; port_i_dat = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    ref_vld_q = 0;
    for (int n = 0; n < 400; n++) begin
      logic exp_vld; logic [W-1:0] exp_dat;
      cfg = dcell_cfg_t'($urandom);
      others_vld = 4'($urandom);
      for (int k = 0; k < 4; k++) others_dat[k] = rnd();
      port_i_vld = 1'($urandom); port_i_dat = rnd();
      #1;
      if (cfg.iosel) begin
        exp_vld = cfg.psel ? ref_vld_q : others_vld[cfg.isel];
        exp_dat = cfg.psel ? ref_dat_q : others_dat[cfg.isel];
        chk(port_oe == 1'b1, "oe in output mode");
        chk(port_o_vld == exp_vld, "out valid");
        chk(!exp_vld || port_o_dat == exp_dat, "out data");
        chk(line_vld == 1'b0, "line quiet in output mode");
        if (cfg.psel) n_pipe++; else n_byp++;
      end else begin
        chk(port_oe == 1'b0, "oe in input mode");
        chk(port_o_vld == 1'b0, "no output in input mode");
        chk(line_vld == port_i_vld && line_dat == port_i_dat, "line in input mode");
        n_in++;
      end
      @(posedge clk);
      ref_vld_q = others_vld[cfg.isel];
      ref_dat_q = others_dat[cfg.isel];
      @(negedge clk);
    end
    chk(n_pipe > 0 && n_byp > 0 && n_in > 0, "all modes exercised");
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
