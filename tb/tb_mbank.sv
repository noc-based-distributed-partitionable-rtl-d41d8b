// tb_mbank: self-checking test of the memory bank. Writes every word with
// random data, reads all words back in random order, and checks the
// one-cycle read latency and that rdata holds while the bank is idle.
module tb_mbank;
  localparam int W = 256, DEPTH = 64, AW = 6;
  logic clk = 0, en, we;
  logic [AW-1:0] addr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  ref_mem [DEPTH];
  int checks = 0, failures = 0;

  mbank #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W/32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, rdata[31:0], exp[31:0]);
    end
  endtask

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      en = 1; we = 1; addr = AW'(a); wdata = rnd(); ref_mem[a] = wdata;
      @(negedge clk);
    end
    for (int n = 0; n < 200; n++) begin
      int a = $urandom_range(DEPTH-1);
      en = 1; we = 0; addr = AW'(a);
      @(negedge clk);
      check(ref_mem[a], "read");
      if ($urandom_range(3) == 0) begin   // idle cycle: rdata holds
        en = 0; addr = AW'($urandom);
        @(negedge clk);
        check(ref_mem[a], "hold");
      end
      if ($urandom_range(3) == 0) begin   // overwrite one word
        int b = $urandom_range(DEPTH-1);
        en = 1; we = 1; addr = AW'(b); wdata = rnd(); ref_mem[b] = wdata;
        @(negedge clk);
        check(ref_mem[a], "hold during write");
      end
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
