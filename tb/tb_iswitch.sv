// tb_iswitch: self-checking test of an iNoC node placed at (X,Y) = (2,1).
// Drives random messages on the vertical bus and on the horizontal bus
// from either side, and checks: a message for row 1 is picked from the
// vertical bus after one cycle and sent both ways on the horizontal bus;
// messages from the neighbours pass through; a message for (2,1) reaches
// the zFSM output exactly one cycle after it was on the horizontal bus;
// nothing else does.
module tb_iswitch;
  import dimarch_pkg::*;
  localparam int X = 2, Y = 1;
  logic clk = 0, rst;
  imsg_t v_i, row_o, from_w, from_e, to_e, to_w, z_o;
  imsg_t exp_row, exp_z;
  int checks = 0, failures = 0, n_self = 0, n_row = 0, n_pass = 0;

  iswitch #(.X(X), .Y(Y)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic imsg_t rmsg();
    imsg_t m;
    m = imsg_t'({$urandom, $urandom});
    m.vld = 1'b1;
    m.x = XY_W'($urandom_range(0, 3));
    m.y = XY_W'($urandom_range(0, 2));
    return m;
  endfunction

  initial begin
    imsg_t h;
    rst = 1; v_i = '0; from_w = '0; from_e = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    exp_row = '0; exp_z = '0;
    for (int n = 0; n < 600; n++) begin
      v_i = ($urandom_range(1) == 0) ? rmsg() : '0;
      from_w = '0; from_e = '0;
      // only one message per horizontal segment and cycle
      if (!exp_row.vld) begin
        case ($urandom_range(2))
          0: from_w = rmsg();
          1: from_e = rmsg();
          default: ;
        endcase
      end
      #1;
      chk(row_o == exp_row, "row pick");
      chk(z_o == exp_z, "zFSM delivery");
      h = exp_row.vld ? exp_row : (from_w.vld ? from_w : from_e);
      if (exp_row.vld) begin
        chk(to_e == exp_row && to_w == exp_row, "own broadcast both ways"); n_row++;
      end else begin
        chk(to_e == from_w && to_w == from_e, "pass-through"); if (h.vld) n_pass++;
      end
      @(posedge clk);
      exp_z   = (h.vld && h.x == X && h.y == Y) ? h : '0;
      exp_row = (v_i.vld && v_i.y == Y) ? v_i : '0;
      if (exp_z.vld) n_self++;
      @(negedge clk);
    end
    chk(n_self > 0 && n_row > 0 && n_pass > 0, "all cases exercised");
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
