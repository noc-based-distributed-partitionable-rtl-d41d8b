// dimarch_pkg: types and constants shared by the distributed memory
// architecture (DiMArch): dNoC directions and dSwitch configuration words,
// iNoC instruction messages and the mFSM/cFSM programming records.
//
// The document fixes the dNoC width (256 bit), the five dSwitch directions
// (MBank, South, West, East, North) and the select signals of a dCell
// (ISEL, PSEL, IOSEL). It gives no instruction format, so the opcode set,
// the field widths and the payload layout below are this design's own.
package dimarch_pkg;

  // ---------------------------------------------------------------- dNoC
  localparam int unsigned DNOC_W = 256;   // dNoC link width (document)
  localparam int unsigned NDIR   = 5;     // directions of a dSwitch

  // Direction order follows the dSwitch drawing, left to right.
  typedef enum logic [2:0] {
    DIR_M = 3'd0,   // mBank (through the mFSM)
    DIR_S = 3'd1,   // South (toward the RFile side)
    DIR_W = 3'd2,   // West
    DIR_E = 3'd3,   // East
    DIR_N = 3'd4    // North
  } dir_e;

  // Configuration of one dCell.
  //   isel  : which of the four other directions the IMUX takes, counted in
  //           the order M,S,W,E,N with the cell's own direction skipped
  //   psel  : 1 = through REG (pipelined), 0 = bypass (single cycle multi-hop)
  //   iosel : 1 = output mode (drive the port), 0 = input mode
  typedef struct packed {
    logic [1:0] isel;
    logic       psel;
    logic       iosel;
  } dcell_cfg_t;

  typedef dcell_cfg_t [NDIR-1:0] dswitch_cfg_t;   // 20 bits

  // ----------------------------------------------------- mBank / mFSM
  localparam int unsigned MB_ADDR_W = 6;  // 64 words x 256 bit = 2 KB
  localparam int unsigned DLY_W     = 8;
  localparam int unsigned CNT_W     = 8;

  typedef enum logic [1:0] {
    AGU_LINEAR  = 2'd0,  // single (count = 1) or vector with stride
    AGU_CIRC    = 2'd1,  // circular buffer of length len, pointer persists
    AGU_BITREV  = 2'd2   // bit-reversed index over len address bits
  } agu_mode_e;

  typedef struct packed {
    agu_mode_e            mode;
    logic                 wr;      // 1 = write mBank from dNoC, 0 = read
    logic [MB_ADDR_W-1:0] base;
    logic [MB_ADDR_W-1:0] stride;
    logic [CNT_W-1:0]     len;     // circular length / bit-reverse width
  } mfsm_addr_t;                   // 25 bits

  typedef struct packed {
    logic [DLY_W-1:0] init_dly;    // once, before the first loop
    logic [DLY_W-1:0] mid_dly;     // between successive accesses of a loop
    logic [DLY_W-1:0] end_dly;     // after a loop, before the next one
  } delays_t;                      // 24 bits

  typedef struct packed {
    logic [CNT_W-1:0] count;       // accesses per loop
    logic [CNT_W-1:0] iters;       // loops; 0 = endless
    delays_t          dly;
  } mfsm_loop_t;                   // 40 bits

  // ---------------------------------------------------------------- cFSM
  localparam int unsigned CF_SLOTS  = 4;
  localparam int unsigned CF_SLOT_W = $clog2(CF_SLOTS);

  typedef struct packed {
    logic [CF_SLOT_W-1:0] slot;
    dswitch_cfg_t         cfg;
    logic [DLY_W-1:0]     hold;    // cycles the slot is applied (0 = 1)
  } cfsm_slot_t;                   // 30 bits

  typedef struct packed {
    logic [CF_SLOT_W:0] nslots;    // slots used per round, 1..CF_SLOTS
    logic [DLY_W-1:0]   init_dly;  // cycles before the first round
    logic [CNT_W-1:0]   iters;     // rounds; 0 = endless
  } cfsm_loop_t;                   // 19 bits

  // ---------------------------------------------------------------- iNoC
  localparam int unsigned XY_W  = 4;   // tile coordinates, up to 16 x 16
  localparam int unsigned PAY_W = 48;

  typedef enum logic [3:0] {
    OP_NOP        = 4'd0,
    OP_VSPLIT     = 4'd1,  // toggle the vertical splitter below this iSwitch
    OP_HSPLIT     = 4'd2,  // toggle the horizontal splitter west of it
    OP_MFSM_ADDR  = 4'd3,  // payload = mfsm_addr_t
    OP_MFSM_START = 4'd4,  // payload = mfsm_loop_t; starts the stream
    OP_MFSM_DLY   = 4'd5,  // payload = delays_t; changes delays on the fly
    OP_CFSM_SLOT  = 4'd6,  // payload = cfsm_slot_t
    OP_CFSM_START = 4'd7,  // payload = cfsm_loop_t; starts the schedule
    OP_STOP       = 4'd8   // payload[0] stops the mFSM, payload[1] the cFSM
  } op_e;

  typedef struct packed {
    logic             vld;
    logic [XY_W-1:0]  x;
    logic [XY_W-1:0]  y;
    op_e              op;
    logic [PAY_W-1:0] pay;
  } imsg_t;                        // 61 bits

  localparam imsg_t IMSG_IDLE = '0;

endpackage
