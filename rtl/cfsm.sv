// cfsm: configuration controller of a dSwitch. It steps the switch through a
// short schedule of configurations so that the paths to and from a register
// file are time multiplexed between several mBanks; with the mFSMs of those
// banks programmed in step, the register file sees one large contiguous
// memory.
//
// The document says what the cFSM achieves (temporal control of the dSwitch,
// programmed over the instruction network) but not how. This design's own
// simplest form: a table of CF_SLOTS configuration slots, each with a hold
// time in cycles. A started schedule waits init_dly cycles, then applies
// slots 0..nslots-1 in turn, each for max(hold,1) cycles, and repeats the
// round iters times (0 = until stopped). A static circuit is a one-slot
// endless schedule. While no schedule runs, all five cells are in input
// mode, so the switch drives none of its links.
//
// Interface: slot_we/slot_wr write one slot, start/loop_cfg start a
// schedule, stop ends it; sw_cfg goes to the dSwitch; busy is high while a
// schedule runs.
// Timing: with start sampled at edge t the first slot is applied from cycle
// t+1+init_dly; sw_cfg is decoded from registers.
module cfsm
  import dimarch_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         slot_we,
  input  cfsm_slot_t   slot_wr,
  input  logic         start,
  input  cfsm_loop_t   loop_cfg,
  input  logic         stop,
  output dswitch_cfg_t sw_cfg,
  output logic         busy
);

  typedef enum logic [1:0] {C_IDLE, C_INIT, C_RUN} state_e;

  dswitch_cfg_t         slot_cfg  [CF_SLOTS];
  logic [DLY_W-1:0]     slot_hold [CF_SLOTS];
  state_e               state;
  logic [CF_SLOT_W:0]   nslots;
  logic [CNT_W-1:0]     iters, round;
  logic [CF_SLOT_W-1:0] cur;
  logic [DLY_W-1:0]     cnt;
  logic                 slot_done, round_done;

  assign busy       = (state != C_IDLE);
  assign sw_cfg     = (state == C_RUN) ? slot_cfg[cur] : '0;
  assign slot_done  = (cnt <= DLY_W'(1));
  assign round_done = ({1'b0, cur} + 1'b1 >= nslots);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < CF_SLOTS; s++) begin
        slot_cfg[s]  <= '0;
        slot_hold[s] <= '0;
      end
      state  <= C_IDLE;
      nslots <= '0;
      iters  <= '0;
      round  <= '0;
      cur    <= '0;
      cnt    <= '0;
    end else begin
      if (slot_we) begin
        slot_cfg[slot_wr.slot]  <= slot_wr.cfg;
        slot_hold[slot_wr.slot] <= slot_wr.hold;
      end
      if (stop) begin
        state <= C_IDLE;
      end else if (start) begin
        nslots <= (loop_cfg.nslots == '0) ? (CF_SLOT_W+1)'(1) : loop_cfg.nslots;
        iters  <= loop_cfg.iters;
        round  <= '0;
        cur    <= '0;
        if (loop_cfg.init_dly == '0) begin
          state <= C_RUN;
          cnt   <= slot_hold[0];
        end else begin
          state <= C_INIT;
          cnt   <= loop_cfg.init_dly;
        end
      end else begin
        unique case (state)
          C_IDLE: ;
          C_INIT: begin
            cnt <= cnt - 1'b1;
            if (slot_done) begin
              state <= C_RUN;
              cnt   <= slot_hold[0];
            end
          end
          C_RUN: begin
            cnt <= cnt - 1'b1;
            if (slot_done) begin
              if (round_done) begin
                cur   <= '0;
                cnt   <= slot_hold[0];
                round <= round + 1'b1;
                if (iters != '0 && round + 1'b1 >= iters) state <= C_IDLE;
              end else begin
                cur <= cur + 1'b1;
                cnt <= slot_hold[cur + 1'b1];
              end
            end
          end
          default: state <= C_IDLE;
        endcase
      end
    end
  end

endmodule
