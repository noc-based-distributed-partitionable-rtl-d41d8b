// mfsm: memory-bank controller and address generation unit. It sits
// between an mBank and the MBank port of the tile's dSwitch and turns a
// short program, received over the instruction network, into a stream of
// mBank reads (sent into the dNoC) or writes (taken from the dNoC).
//
// As the document describes, it offers single and vectorized accesses with a
// programmable address offset, circular-buffer and bit-reversed addressing,
// and a timing model of three delays: an initial delay before the first
// loop, an intermittent delay between accesses of a loop and an end delay
// after each loop. Delays can be rewritten while a stream runs, which makes
// the stream elastic. The exact address formulas, field widths and the
// cycle-level behaviour below are this design's own:
//   LINEAR : addr = base + i*stride, i = 0..count-1, restarting every loop
//            (count = 1 gives a single access)
//   CIRC   : addr = base + p, p advances by stride modulo len and keeps its
//            value from loop to loop (len must be > stride)
//   BITREV : addr = base + bitreverse(i) over the low len bits
//
// Interface: cfg_addr_we/cfg_addr, start/cfg_loop and dly_we/cfg_dly come
// from the zFSM; stop aborts. mb_* drive the mBank; dn_o_* go to the
// dSwitch MBank port, dn_i_* come from it. busy is high while a program runs.
// Timing: with start sampled at edge t, the first access is in cycle
// t+1+init_dly. An access takes one cycle; successive accesses of a loop are
// mid_dly+1 cycles apart; the last access of a loop and the first of the
// next are end_dly+1 cycles apart. Read data leaves on dn_o one cycle after
// its access cycle. A write takes dn_i in its access cycle and happens only
// if dn_i_vld is high. iters = 0 runs until stop.
module mfsm
  import dimarch_pkg::*;
#(
  parameter int unsigned W  = DNOC_W,
  parameter int unsigned AW = MB_ADDR_W
) (
  input  logic          clk,
  input  logic          rst,
  // programming
  input  logic          cfg_addr_we,
  input  mfsm_addr_t    cfg_addr,
  input  logic          start,
  input  mfsm_loop_t    cfg_loop,
  input  logic          dly_we,
  input  delays_t       cfg_dly,
  input  logic          stop,
  output logic          busy,
  // mBank
  output logic          mb_en,
  output logic          mb_we,
  output logic [AW-1:0] mb_addr,
  output logic [W-1:0]  mb_wdata,
  input  logic [W-1:0]  mb_rdata,
  // dSwitch MBank port
  output logic          dn_o_vld,
  output logic [W-1:0]  dn_o_dat,
  input  logic          dn_i_vld,
  input  logic [W-1:0]  dn_i_dat
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_ACC, S_MID, S_END} state_e;

  state_e           state;
  mfsm_addr_t       acfg;
  logic [CNT_W-1:0] count, iters;
  delays_t          dly;
  logic [DLY_W-1:0] wait_cnt;
  logic [CNT_W-1:0] idx, iter;
  logic [AW-1:0]    off;     // LINEAR running offset
  logic [CNT_W-1:0] ptr;     // CIRC pointer
  logic [AW-1:0]    rev_idx;
  logic [AW-1:0]    addr_c;
  logic             last_in_loop, last_loop;
  logic [CNT_W:0]   ptr_next;

  // bit reverse of idx over the low acfg.len bits
  always_comb begin
    rev_idx = '0;
    for (int b = 0; b < AW; b++)
      if (b < int'(acfg.len))
        rev_idx[b] = idx[int'(acfg.len) - 1 - b];
  end

  always_comb begin
    unique case (acfg.mode)
      AGU_CIRC:   addr_c = acfg.base + AW'(ptr);
      AGU_BITREV: addr_c = acfg.base + rev_idx;
      default:    addr_c = acfg.base + off;
    endcase
  end

  assign last_in_loop = (idx + 1'b1 >= count);
  assign last_loop    = (iters != '0) && (iter + 1'b1 >= iters);
  assign ptr_next     = {1'b0, ptr} + (CNT_W+1)'(acfg.stride);

  assign busy     = (state != S_IDLE);
  assign mb_en    = (state == S_ACC) && (!acfg.wr || dn_i_vld);
  assign mb_we    = acfg.wr;
  assign mb_addr  = addr_c;
  assign mb_wdata = dn_i_dat;
  assign dn_o_dat = mb_rdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      acfg     <= '0;
      count    <= '0;
      iters    <= '0;
      dly      <= '0;
      wait_cnt <= '0;
      idx      <= '0;
      iter     <= '0;
      off      <= '0;
      ptr      <= '0;
      dn_o_vld <= 1'b0;
    end else begin
      dn_o_vld <= (state == S_ACC) && !acfg.wr;
      if (cfg_addr_we) acfg <= cfg_addr;
      if (dly_we)      dly  <= cfg_dly;

      if (stop) begin
        state <= S_IDLE;
      end else if (start) begin
        count <= (cfg_loop.count == '0) ? CNT_W'(1) : cfg_loop.count;
        iters <= cfg_loop.iters;
        dly   <= cfg_loop.dly;
        idx   <= '0;
        iter  <= '0;
        off   <= '0;
        ptr   <= '0;
        if (cfg_loop.dly.init_dly == '0) begin
          state <= S_ACC;
        end else begin
          state    <= S_INIT;
          wait_cnt <= cfg_loop.dly.init_dly;
        end
      end else begin
        unique case (state)
          S_IDLE: ;
          S_INIT, S_MID, S_END: begin
            if (wait_cnt <= DLY_W'(1)) state <= S_ACC;
            wait_cnt <= wait_cnt - 1'b1;
          end
          S_ACC: begin
            // advance the address generators
            off <= off + acfg.stride;
            ptr <= (ptr_next >= {1'b0, acfg.len}) ? CNT_W'(ptr_next - {1'b0, acfg.len})
                                                  : CNT_W'(ptr_next);
            if (!last_in_loop) begin
              idx <= idx + 1'b1;
              if (dly.mid_dly != '0) begin
                state    <= S_MID;
                wait_cnt <= dly.mid_dly;
              end
            end else begin
              idx  <= '0;
              off  <= '0;
              iter <= iter + 1'b1;
              if (last_loop) begin
                state <= S_IDLE;
              end else if (dly.end_dly != '0) begin
                state    <= S_END;
                wait_cnt <= dly.end_dly;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
