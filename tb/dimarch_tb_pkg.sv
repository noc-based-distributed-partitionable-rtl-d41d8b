// dimarch_tb_pkg: helpers shared by the tile and system testbenches to
// build instruction messages and dSwitch routes.
package dimarch_tb_pkg;
  import dimarch_pkg::*;

  function automatic imsg_t msg(input int x, input int y, input op_e op,
                                input logic [PAY_W-1:0] pay);
    imsg_t m;
    m.vld = 1'b1; m.x = XY_W'(x); m.y = XY_W'(y); m.op = op; m.pay = pay;
    return m;
  endfunction

  function automatic logic [PAY_W-1:0] p_cslot(input int slot, input dswitch_cfg_t cfg,
                                               input int hold);
    cfsm_slot_t s;
    s.slot = CF_SLOT_W'(slot); s.cfg = cfg; s.hold = DLY_W'(hold);
    return PAY_W'(s);
  endfunction

  function automatic logic [PAY_W-1:0] p_cloop(input int nslots, input int init, input int iters);
    cfsm_loop_t l;
    l.nslots = (CF_SLOT_W+1)'(nslots); l.init_dly = DLY_W'(init); l.iters = CNT_W'(iters);
    return PAY_W'(l);
  endfunction

  function automatic logic [PAY_W-1:0] p_maddr(input agu_mode_e mode, input logic wr,
                                               input int base, input int stride, input int len);
    mfsm_addr_t a;
    a.mode = mode; a.wr = wr; a.base = MB_ADDR_W'(base); a.stride = MB_ADDR_W'(stride);
    a.len = CNT_W'(len);
    return PAY_W'(a);
  endfunction

  function automatic logic [PAY_W-1:0] p_mloop(input int count, input int iters,
                                               input int init, input int mid, input int fin);
    mfsm_loop_t l;
    l.count = CNT_W'(count); l.iters = CNT_W'(iters);
    l.dly.init_dly = DLY_W'(init); l.dly.mid_dly = DLY_W'(mid); l.dly.end_dly = DLY_W'(fin);
    return PAY_W'(l);
  endfunction

  function automatic logic [PAY_W-1:0] p_mdly(input int init, input int mid, input int fin);
    delays_t d;
    d.init_dly = DLY_W'(init); d.mid_dly = DLY_W'(mid); d.end_dly = DLY_W'(fin);
    return PAY_W'(d);
  endfunction

  // add to cfg a circuit from direction `from` to output direction `to`
  function automatic dswitch_cfg_t route(input dswitch_cfg_t cfg, input dir_e from,
                                         input dir_e to, input logic pipe);
    dswitch_cfg_t c = cfg;
    int k = (int'(from) < int'(to)) ? int'(from) : int'(from) - 1;
    c[to].isel = 2'(k); c[to].psel = pipe; c[to].iosel = 1'b1;
    return c;
  endfunction
endpackage
