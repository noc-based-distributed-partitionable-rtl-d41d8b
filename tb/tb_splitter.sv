// tb_splitter: self-checking test of an iNoC bus splitter. Checks that it
// is open after reset, that each toggle flips it at the clock edge, and
// that messages cross in both directions only while it is closed.
module tb_splitter;
  import dimarch_pkg::*;
  logic clk = 0, rst, toggle, closed;
  imsg_t a_i, a_o, b_i, b_o;
  logic ref_closed;
  int checks = 0, failures = 0;

  splitter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    rst = 1; toggle = 0; a_i = '0; b_i = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    ref_closed = 0;
    chk(closed == 0, "open after reset");
    for (int n = 0; n < 300; n++) begin
      toggle = ($urandom_range(2) == 0);
      a_i = imsg_t'({$urandom, $urandom});
      b_i = imsg_t'({$urandom, $urandom});
      #1;
      chk(closed == ref_closed, "state");
      chk(b_o == (ref_closed ? a_i : '0), "a to b");
      chk(a_o == (ref_closed ? b_i : '0), "b to a");
      @(posedge clk);
      if (toggle) ref_closed = ~ref_closed;
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
