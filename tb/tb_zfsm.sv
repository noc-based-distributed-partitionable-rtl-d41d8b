// tb_zfsm: self-checking test of the tile instruction decoder. Sends
// every opcode with random payloads, with and without the valid bit, and
// checks that exactly the matching strobe fires and that each record is
// the payload's low bits.
module tb_zfsm;
  import dimarch_pkg::*;
  imsg_t z_i;
  logic vsplit_toggle, hsplit_toggle, mf_addr_we, mf_start, mf_dly_we, mf_stop;
  logic cf_slot_we, cf_start, cf_stop;
  mfsm_addr_t mf_addr; mfsm_loop_t mf_loop; delays_t mf_dly;
  cfsm_slot_t cf_slot; cfsm_loop_t cf_loop;
  int checks = 0, failures = 0;
  logic clk = 0;

  zfsm dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s op=%0d", what, z_i.op); end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [8:0] exp;
      z_i = imsg_t'({$urandom, $urandom});
      z_i.op = op_e'($urandom_range(0, 9));
      z_i.vld = ($urandom_range(3) != 0);
      #1;
      exp = '0;
      if (z_i.vld) begin
        case (z_i.op)
          OP_VSPLIT:     exp[0] = 1;
          OP_HSPLIT:     exp[1] = 1;
          OP_MFSM_ADDR:  exp[2] = 1;
          OP_MFSM_START: exp[3] = 1;
          OP_MFSM_DLY:   exp[4] = 1;
          OP_CFSM_SLOT:  exp[6] = 1;
          OP_CFSM_START: exp[7] = 1;
          OP_STOP:       begin exp[5] = z_i.pay[0]; exp[8] = z_i.pay[1]; end
          default: ;
        endcase
      end
      chk({cf_stop, cf_start, cf_slot_we, mf_stop, mf_dly_we, mf_start, mf_addr_we,
           hsplit_toggle, vsplit_toggle} == exp, "strobes");
      chk(mf_addr == z_i.pay[$bits(mfsm_addr_t)-1:0], "mfsm address record");
      chk(mf_loop == z_i.pay[$bits(mfsm_loop_t)-1:0], "mfsm loop record");
      chk(mf_dly  == z_i.pay[$bits(delays_t)-1:0], "mfsm delay record");
      chk(cf_slot == z_i.pay[$bits(cfsm_slot_t)-1:0], "cfsm slot record");
      chk(cf_loop == z_i.pay[$bits(cfsm_loop_t)-1:0], "cfsm loop record");
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
